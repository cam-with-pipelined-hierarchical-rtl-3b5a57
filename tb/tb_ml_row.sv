// tb_ml_row: cycle-accurate test of one pipelined match line.
// A word-level reference model tracks, per stage, the registered result
// enable & pre_n & (stored segment == key segment), where stage s sees
// the key presented s cycles earlier. The testbench presents a new key
// every cycle (skewing the rails as the key register of the array does),
// writes the word at random times, and compares all three stage outputs
// every cycle. It also runs the single-search sequence of the original circuit's
// simulation (3, 2, 1 and 0 matching stages) and checks that the full
// match appears exactly 3 cycles after the search.
module tb_ml_row;
  localparam int S = 3, B = 6, K = S * B;
  logic clk = 0, rst_n, we, en1, pre_n;
  logic [K-1:0] wd, sl, slb;
  logic [S-1:0] stage_out;
  logic [K-1:0] word;
  logic [S-1:0] exp;
  logic [K-1:0] keyh [S];
  int checks = 0, failures = 0;
  int gated2 = 0, gated3 = 0, full = 0;

  ml_row #(.STAGES(S), .STAGE_BITS(B)) dut (.clk(clk), .rst_n(rst_n), .we(we), .wd(wd),
    .sl(sl), .slb(slb), .en1(en1), .pre_n(pre_n), .stage_out(stage_out));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive the skewed dual-rail search lines from the key history.
  function automatic void drive_rails();
    for (int s = 0; s < S; s++) begin
      sl [s*B +: B] = keyh[s][s*B +: B];
      slb[s*B +: B] = ~keyh[s][s*B +: B];
    end
  endfunction

  // One clock: compare, then advance the model with the stimulus in place.
  task automatic step(input logic e, input logic [K-1:0] key, input logic w, input logic [K-1:0] d, input logic p);
    logic [S-1:0] nxt;
    for (int s = S-1; s > 0; s--) keyh[s] = keyh[s-1];
    keyh[0] = key;
    en1 = e; we = w; wd = d; pre_n = p;
    drive_rails();
    for (int s = 0; s < S; s++)
      nxt[s] = p & (s == 0 ? e : exp[s-1]) & (word[s*B +: B] == keyh[s][s*B +: B]);
    if (e && !nxt[0] ) gated2++;
    if (exp[0] && !nxt[1]) gated3++;
    @(posedge clk);
    exp = nxt;
    if (w) word = d;
    @(negedge clk);
    checks++;
    if (stage_out !== exp) begin
      failures++; $display("%0t: stage_out=%b exp=%b", $time, stage_out, exp);
    end
    if (exp[S-1]) full++;
  endtask

  initial begin
    logic [K-1:0] k;
    rst_n = 0; we = 0; wd = '0; en1 = 0; pre_n = 1; sl = '0; slb = '0;
    for (int s = 0; s < S; s++) keyh[s] = '0;
    exp = '0;
    word = 18'h2A5C3;
    @(negedge clk); we = 1; wd = word;
    @(negedge clk); @(negedge clk);
    rst_n = 1; we = 0;
    checks++; if (stage_out !== '0) begin failures++; $display("reset: %b", stage_out); end

    // Single searches: key agreeing with 3, 2, 1, 0 leading stages.
    for (int m = 3; m >= 0; m--) begin
      k = word;
      if (m < 3) k[m*B] = ~k[m*B];   // spoil stage m
      step(1, k, 0, '0, 1);
      for (int c = 1; c <= 3; c++) begin
        // after c edges stage c-1 shows whether the first c stages matched
        checks++;
        if (stage_out[c-1] !== (c <= m)) begin
          failures++; $display("pattern %0d: stage %0d out=%b", m, c, stage_out[c-1]);
        end
        step(0, '0, 0, '0, 1);
      end
    end

    // Back-to-back random searches with writes and precharge.
    for (int i = 0; i < 6000; i++) begin
      case ($urandom_range(0, 3))
        0: k = word;
        1: begin k = word; k[12 +: 6] = 6'($urandom); end
        2: begin k = word; k[6 +: 12] = 12'($urandom); end
        default: k = K'($urandom);
      endcase
      step($urandom_range(0, 4) != 0, k, $urandom_range(0, 15) == 0, K'($urandom),
           $urandom_range(0, 19) != 0);
    end
    if (gated2 == 0 || gated3 == 0 || full == 0) begin
      failures++; $display("mechanism not exercised: gated2=%0d gated3=%0d full=%0d", gated2, gated3, full);
    end
    $display("stage-2 switched off %0d times, stage-3 %0d times, full matches %0d", gated2, gated3, full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
