// tb_output_encoder: self-checking testbench for output_encoder (N = 16).
// The testbench plays the PMM array: a list of match vectors, one per text
// position, advanced only on cycles where step = want && !hold. Every packet
// must carry the expected (index, position) pair in order (positions from 1,
// indices ascending within a position). Checked too:
//  - sparse phase (at most one match per position, out_ready high): hold is
//    never raised, one position per clock;
//  - dense phase (several matches per position): the last packet leaves
//    exactly 1 + sum(max(1, matches at position)) cycles after the first step;
//  - random phase: random out_ready and step requests, positions restart at 1
//    after clear.
module tb_output_encoder;
  import bpnfa_pkg::*;

  localparam int unsigned N = 16;
  localparam int NV = 400;

  logic         clk = 1'b0;
  logic         rst_n, clear, step, want;
  logic [N-1:0] match_vec;
  logic         hold, busy, out_valid, out_ready;
  pkt_t         out_pkt;
  int checks = 0, failures = 0;

  output_encoder #(.N(N)) dut (.*);

  assign step = want && !hold;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  logic [N-1:0] vecs [NV];
  int           nsteps;     // steps taken so far
  pkt_t         expq [$];
  longint       cyc = 0;
  longint       last_pkt_cyc, first_step_cyc;
  int           holds;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (hold) holds <= holds + 1;
    if (step) begin
      if (nsteps == 0) first_step_cyc <= cyc;
      match_vec <= vecs[nsteps];
      nsteps    <= nsteps + 1;
    end
    if (out_valid && out_ready) begin
      last_pkt_cyc <= cyc;
      if (expq.size() == 0) check(1'b0, "unexpected packet");
      else begin
        pkt_t e;
        e = expq.pop_front();
        check(out_pkt == e, $sformatf("packet %h exp %h", out_pkt, e));
      end
    end
  end

  // prepare NV vectors and the expected packets
  task automatic prepare(int kind);
    expq.delete();
    for (int j = 0; j < NV; j++) begin
      logic [N-1:0] v;
      v = '0;
      unique case (kind)
        0: if ($urandom % 3 == 0) v[$urandom % N] = 1'b1;
        1: v = N'($urandom) & N'($urandom);
        default: v = ($urandom % 2) ? N'($urandom) & N'($urandom) & N'($urandom) : '0;
      endcase
      if (j == NV - 1 && v == '0) v[N-1] = 1'b1;
      vecs[j] = v;
      for (int i = 0; i < N; i++)
        if (v[i]) expq.push_back(make_pkt(OP_MATCH, IDX_W'(i), 4'd0, 8'd0, 32'(j + 1)));
    end
  endtask

  task automatic run_phase(bit rand_ready, bit rand_want);
    clear = 1; @(negedge clk); clear = 0;
    nsteps = 0; holds = 0;
    while (nsteps < NV) begin
      want      = rand_want ? ($urandom % 3 != 0) : 1'b1;
      out_ready = rand_ready ? ($urandom % 3 != 0) : 1'b1;
      @(negedge clk);
      if (nsteps >= NV) want = 0;
    end
    want = 0;
    while (busy) begin
      out_ready = rand_ready ? ($urandom % 3 != 0) : 1'b1;
      @(negedge clk);
    end
    out_ready = 1;
    check(expq.size() == 0, $sformatf("%0d packets missing", expq.size()));
  endtask

  initial begin
    int s;
    rst_n = 0; clear = 0; want = 0; out_ready = 1; match_vec = '0;
    nsteps = 0; holds = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && !busy && !hold, "idle after reset");

    // sparse: never stalls
    prepare(0);
    run_phase(1'b0, 1'b0);
    check(holds == 0, $sformatf("sparse phase stalled %0d times", holds));

    // dense: one cycle per match
    prepare(1);
    s = 0;
    for (int j = 0; j < NV; j++) s += ($countones(vecs[j]) > 1) ? $countones(vecs[j]) : 1;
    run_phase(1'b0, 1'b0);
    check(last_pkt_cyc - first_step_cyc == longint'(s + 1),
          $sformatf("dense phase took %0d cycles, expected %0d", last_pkt_cyc - first_step_cyc, s + 1));
    check(holds > 0, "dense phase never stalled");

    // random handshakes, three runs (positions restart after clear)
    for (int r = 0; r < 3; r++) begin
      prepare(2);
      run_phase(1'b1, 1'b1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
