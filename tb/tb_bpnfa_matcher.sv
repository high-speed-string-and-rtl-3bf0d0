// tb_bpnfa_matcher: end-to-end testbench for bpnfa_matcher at reduced size.
// One extended-pattern matcher and one string matcher with 8 PMMs each are
// driven by tb_matcher_host (full load of every PMM, planted matches,
// dropped packets, a reconfiguration round with host backpressure), and every
// mechanism of the matcher must have been exercised at least once.
module tb_bpnfa_matcher;
  import bpnfa_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic  e_iv, e_ir, e_ov, e_or, e_err, s_iv, s_ir, s_ov, s_or, s_err;
  pkt_t  e_ip, e_op, s_ip, s_op;
  mode_e e_mode, s_mode;
  logic  e_done, s_done;
  int    e_chk, e_fail, e_st, e_mm, e_bp, e_ms, e_dr, e_rc;
  int    s_chk, s_fail, s_st, s_mm, s_bp, s_ms, s_dr, s_rc;
  int checks = 0, failures = 0;

  bpnfa_matcher #(.CLASS(CLASS_EXT), .L(32), .N(N)) dut_ext (
    .clk, .rst_n, .in_valid(e_iv), .in_ready(e_ir), .in_pkt(e_ip),
    .out_valid(e_ov), .out_ready(e_or), .out_pkt(e_op), .mode(e_mode), .err(e_err));
  bpnfa_matcher #(.CLASS(CLASS_STR), .L(32), .N(N)) dut_str (
    .clk, .rst_n, .in_valid(s_iv), .in_ready(s_ir), .in_pkt(s_ip),
    .out_valid(s_ov), .out_ready(s_or), .out_pkt(s_op), .mode(s_mode), .err(s_err));

  tb_matcher_host #(.CLASS(CLASS_EXT), .N(N), .L(32), .TEXTLEN(2000), .NSHORT(4)) host_ext (
    .clk, .rst_n, .in_valid(e_iv), .in_ready(e_ir), .in_pkt(e_ip),
    .out_valid(e_ov), .out_ready(e_or), .out_pkt(e_op), .mode(e_mode), .err(e_err),
    .done(e_done), .checks(e_chk), .failures(e_fail), .n_stall(e_st), .n_multi(e_mm),
    .n_backpressure(e_bp), .n_mode_switch(e_ms), .n_dropped(e_dr), .n_reconfig(e_rc));
  tb_matcher_host #(.CLASS(CLASS_STR), .N(N), .L(32), .TEXTLEN(2000), .NSHORT(4)) host_str (
    .clk, .rst_n, .in_valid(s_iv), .in_ready(s_ir), .in_pkt(s_ip),
    .out_valid(s_ov), .out_ready(s_or), .out_pkt(s_op), .mode(s_mode), .err(s_err),
    .done(s_done), .checks(s_chk), .failures(s_fail), .n_stall(s_st), .n_multi(s_mm),
    .n_backpressure(s_bp), .n_mode_switch(s_ms), .n_dropped(s_dr), .n_reconfig(s_rc));

  task automatic need(int count, string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + e_chk + s_chk, failures + e_fail + s_fail + 1);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (e_done && s_done);
    need(e_st, "EXT pipeline stalls");
    need(e_mm, "EXT positions with several matches");
    need(e_bp, "EXT output backpressure cycles");
    need(e_ms, "EXT mode switches");
    need(e_dr, "EXT dropped packets");
    need(e_rc, "EXT reconfigured PMMs");
    need(s_st, "STR pipeline stalls");
    need(s_mm, "STR positions with several matches");
    need(s_bp, "STR output backpressure cycles");
    need(s_ms, "STR mode switches");
    need(s_dr, "STR dropped packets");
    need(s_rc, "STR reconfigured PMMs");
    $display("TB_RESULT checks=%0d failures=%0d", checks + e_chk + s_chk, failures + e_fail + s_fail);
    $finish;
  end
endmodule
