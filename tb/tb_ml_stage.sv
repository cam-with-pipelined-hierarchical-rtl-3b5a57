// tb_ml_stage: random test of one 6-cell stage.
// Writes random words, drives random keys as dual-rail search lines (and
// sometimes both rails low), random enable and precharge, and checks that
// the registered output equals enable & pre_n & (word == key) of the
// previous cycle: one cycle of latency.
module tb_ml_stage;
  localparam int B = 6;
  logic clk = 0, rst_n, we, enable, pre_n, out;
  logic [B-1:0] wd, sl, slb;
  logic [B-1:0] word;
  logic exp;
  int checks = 0, failures = 0, hits = 0;

  ml_stage #(.BITS(B)) dut (.clk(clk), .rst_n(rst_n), .we(we), .wd(wd), .sl(sl), .slb(slb),
                            .enable(enable), .pre_n(pre_n), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [B-1:0] key;
    logic gated;
    rst_n = 0; we = 1; wd = '0; sl = '0; slb = '0; enable = 0; pre_n = 1;
    word = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1; we = 0;
    checks++; if (out !== 0) begin failures++; $display("reset: out=%0b", out); end
    exp = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (out !== exp) begin failures++; $display("cycle %0d: out=%0b exp=%0b", i, out, exp); end
      // new stimulus
      we = ($urandom_range(0, 7) == 0);
      wd = B'($urandom);
      key = ($urandom_range(0, 1) == 0) ? word : B'($urandom);
      gated = ($urandom_range(0, 9) == 0);
      sl  = gated ? '0 : key;
      slb = gated ? '0 : ~key;
      enable = ($urandom_range(0, 3) != 0);
      pre_n  = ($urandom_range(0, 9) != 0);
      // expected value after the next edge, from the word held now
      exp = enable & pre_n & (gated ? 1'b1 : (key == word));
      if (exp) hits++;
      if (we) word = wd;   // the write lands at the same edge
    end
    @(negedge clk);
    checks++; if (out !== exp) begin failures++; $display("last: out=%0b exp=%0b", out, exp); end
    if (hits == 0) begin failures++; $display("no matches exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
