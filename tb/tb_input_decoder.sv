// tb_input_decoder: self-checking testbench for input_decoder.
// A directed part walks through loading (register, MOVE and REPPOS writes),
// the switch to run-time mode (held off while busy), letters (taken only when
// adv is high), dropped packets (mask write at run time, letter at
// pre-processing time, an output opcode) and the switch back. A random part
// then drives 20,000 cycles of random packets, valid, adv and busy and checks
// every output against a reference of the packet rules.
module tb_input_decoder;
  import bpnfa_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid, in_ready;
  pkt_t    in_pkt;
  logic    adv, busy;
  mode_e   mode;
  cfg_wr_t cfg;
  logic    clear, letter_valid, err;
  sym_t    letter;
  int checks = 0, failures = 0;

  input_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // reference state
  mode_e   m_mode;
  bit      m_cfg_v, m_err;
  cfg_wr_t m_cfg;
  bit      model_on = 0;

  function automatic bit is_cfg_op(op_e o);
    return o == OP_CFG_REG || o == OP_CFG_MOVE || o == OP_CFG_REPPOS;
  endfunction

  // combinational expectations and reference update, evaluated just before
  // each rising edge
  always @(posedge clk) begin
    if (model_on) begin
      op_e o;
      bit  rdy, tk;
      o   = op_e'(in_pkt[63:60]);
      rdy = (o == OP_RUN || o == OP_PRE) ? !busy :
            (o == OP_TEXT && m_mode == MODE_RUN) ? adv : 1'b1;
      tk  = in_valid && rdy;
      check(in_ready == rdy, "in_ready");
      check(clear == (tk && o == OP_RUN), "clear");
      check(letter_valid == (in_valid && o == OP_TEXT && m_mode == MODE_RUN), "letter_valid");
      if (letter_valid) check(letter == in_pkt[39:32], "letter");
      check(mode == m_mode, "mode");
      check(cfg.valid == m_cfg_v, "cfg.valid");
      if (m_cfg_v) check(cfg == m_cfg, "cfg fields");
      check(err == m_err, "err");
      m_cfg_v = tk && is_cfg_op(o) && m_mode == MODE_PRE;
      if (m_cfg_v) begin
        m_cfg.valid = 1'b1;
        m_cfg.pmm   = in_pkt[59:44];
        m_cfg.sel   = reg_sel_e'(in_pkt[43:40]);
        m_cfg.addr  = in_pkt[39:32];
        m_cfg.data  = in_pkt[31:0];
        m_cfg.tgt   = (o == OP_CFG_MOVE) ? TGT_MOVE : (o == OP_CFG_REPPOS) ? TGT_REPPOS : TGT_REG;
      end
      m_err = tk && ((is_cfg_op(o) && m_mode == MODE_RUN) ||
                     (o == OP_TEXT && m_mode == MODE_PRE) || in_pkt[63:60] > 4'd6);
      if (tk && o == OP_RUN) m_mode = MODE_RUN;
      if (tk && o == OP_PRE) m_mode = MODE_PRE;
    end
  end

  task automatic send(pkt_t p);
    in_valid = 1; in_pkt = p;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_pkt = '0; adv = 1; busy = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_mode = MODE_PRE; m_cfg_v = 0; m_err = 0; m_cfg = '0;
    check(mode == MODE_PRE, "reset mode");
    model_on = 1;

    // directed: loading
    send(make_pkt(OP_CFG_REG, 16'd7, 4'(REG_EPSEND), 8'h00, 32'h0000_0048));
    check(cfg.valid && cfg.pmm == 7 && cfg.tgt == TGT_REG && cfg.sel == REG_EPSEND &&
          cfg.data == 32'h48, "register write decoded");
    send(make_pkt(OP_CFG_MOVE, 16'd3, 4'd0, 8'h41, 32'h5d));
    check(cfg.valid && cfg.pmm == 3 && cfg.tgt == TGT_MOVE && cfg.addr == 8'h41, "MOVE write decoded");
    send(make_pkt(OP_CFG_REPPOS, 16'd3, 4'd0, 8'h43, 32'h40));
    check(cfg.valid && cfg.tgt == TGT_REPPOS && cfg.addr == 8'h43, "REPPOS write decoded");
    send(make_pkt(OP_TEXT, 16'd0, 4'd0, 8'h41, 32'h0));
    check(err && !cfg.valid, "letter dropped in pre-processing mode");
    // run, held off while busy
    busy = 1;
    in_valid = 1; in_pkt = make_pkt(OP_RUN, '0, '0, '0, '0);
    @(negedge clk);
    check(mode == MODE_PRE, "RUN waits for busy");
    busy = 0;
    @(negedge clk);
    in_valid = 0;
    check(mode == MODE_RUN, "RUN taken");
    // letters follow adv
    adv = 0;
    in_valid = 1; in_pkt = make_pkt(OP_TEXT, '0, '0, 8'h42, '0);
    #1 check(!in_ready && letter_valid && letter == 8'h42, "letter stalled");
    @(negedge clk);
    adv = 1;
    #1 check(in_ready, "letter taken");
    @(negedge clk);
    in_valid = 0;
    send(make_pkt(OP_CFG_MOVE, 16'd3, 4'd0, 8'h41, 32'h1));
    check(err && !cfg.valid, "mask write dropped in run-time mode");
    send(make_pkt(OP_MATCH, 16'd3, 4'd0, 8'h41, 32'h1));
    check(err, "output opcode dropped");
    send(make_pkt(OP_NOP, '0, '0, '0, '0));
    check(!err, "NOP accepted silently");
    send(make_pkt(OP_PRE, '0, '0, '0, '0));
    check(mode == MODE_PRE, "PRE taken");

    // random
    for (int k = 0; k < 20000; k++) begin
      in_valid = $urandom % 4 != 0;
      in_pkt   = {4'($urandom % 9), 28'($urandom), 32'($urandom)};
      if ($urandom % 8 == 0) in_pkt[63:60] = (m_mode == MODE_RUN) ? 4'(OP_PRE) : 4'(OP_RUN);
      adv  = $urandom % 4 != 0;
      busy = $urandom % 3 == 0;
      @(negedge clk);
    end
    model_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
