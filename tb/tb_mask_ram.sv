// tb_mask_ram: self-checking testbench for mask_ram.
// Fills all 256 lines with random words, reads every line back (one-cycle
// read latency, one read per clock), checks that rdata holds while re is low,
// that a read in the same cycle as a write to the same line returns the old
// word, and finishes with random mixed traffic against a software copy.
module tb_mask_ram;
  localparam int unsigned W = 32;
  localparam int unsigned D = 256;

  logic         clk = 1'b0;
  logic         we, re;
  logic [7:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  mask_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  initial begin
    logic [W-1:0] held;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1; waddr = 8'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    // back-to-back reads: line a appears at the edge that samples raddr = a
    for (int a = 0; a < D; a++) begin
      re = 1; raddr = 8'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("read line %0d", a));
    end
    // hold while re is low
    held = rdata;
    re = 0; raddr = 8'd17;
    repeat (3) begin
      @(negedge clk);
      check(rdata == held, "hold");
    end
    // read and write the same line in one cycle: old data
    re = 1; raddr = 8'd40; we = 1; waddr = 8'd40; wdata = ~model[40];
    @(negedge clk);
    check(rdata == model[40], "read-during-write old data");
    model[40] = wdata;
    we = 0;
    @(negedge clk);
    check(rdata == model[40], "new data after write");
    // random traffic
    for (int k = 0; k < 5000; k++) begin
      logic [W-1:0] exp_d;
      bit           rd;
      rd = $urandom % 2;
      re = rd; raddr = 8'($urandom);
      exp_d = model[raddr];
      we = $urandom % 2; waddr = 8'($urandom); wdata = $urandom;
      @(negedge clk);
      if (we) model[waddr] = wdata;
      if (rd) check(rdata == exp_d, "random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
