// tb_cam_activity: which parts of the 18 x 64 array switch on for the
// single-line test patterns of the original circuit.
//
// The circuit was characterised with one match line searched by keys that
// agree with 3, 2, 1 and 0 of its leading 6-bit segments. Its power then
// depends on which segments' sense amplifiers are enabled: a segment after
// a miss is switched off. This testbench reproduces those four runs on the
// full array (word 0 is the line under test; every other word differs from
// the key in its first segment) and counts, per segment, the enabled
// sense amplifiers and the layers whose local search-line receivers are
// on. Expected, for m matching segments of word 0:
//   segment 1: 64 sense amplifiers, 8 layers (every word is compared);
//   segment 2: 1 amplifier and 1 layer if m >= 1, else 0;
//   segment 3: 1 amplifier and 1 layer if m >= 2, else 0.
// It then runs the fixed 8-line pattern (lines of layer 0 matching 3, 2,
// 1, 0, 1, 0, 1, 0 leading segments), expecting 64 / 5 / 2 enabled
// amplifiers and 8 / 1 / 1 active layers for segments 1 / 2 / 3.
module tb_cam_activity;
  import cam_pkg::*;
  localparam int R = ML_ROWS, S = STAGES, B = STAGE_BITS, K = KEY_BITS;
  localparam int L = R / LAYER_ROWS;

  logic clk = 0, rst_n, pre_n, search_en, we, match_valid;
  logic [K-1:0] search_key, wdata;
  logic [$clog2(R)-1:0] waddr;
  logic [R-1:0] match;
  logic [R-1:0][S-1:0] stage_out;
  logic [L-1:0][S-1:0] lsl_en;
  int checks = 0, failures = 0;

  cam_18x64 dut (
    .clk(clk), .rst_n(rst_n), .pre_n(pre_n),
    .search_en(search_en), .search_key(search_key), .match(match), .match_valid(match_valid),
    .we(we), .waddr(waddr), .wdata(wdata),
    .stage_out(stage_out), .lsl_en(lsl_en)
  );

  always #2.5ns clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [K-1:0] KEY = 18'h2B4E1;

  task automatic write_word(input int a, input logic [K-1:0] d);
    @(negedge clk); we = 1; waddr = a[$clog2(R)-1:0]; wdata = d;
    @(negedge clk); we = 0;
  endtask

  // Key KEY spoiled in segment m (m = 3: unchanged).
  function automatic logic [K-1:0] partial(input int m, input int bitsel);
    logic [K-1:0] k = KEY;
    if (m < S) k[m*B + bitsel] = ~k[m*B + bitsel];
    return k;
  endfunction

  // Present KEY once, then count per segment the enabled sense amplifiers
  // (segment 1: search_en; segment s+1: registered segment-s result) and
  // the layers with their receivers on, in the cycle that segment works.
  task automatic run(input string name, input int exp_sa [S], input int exp_rx [S], input logic [R-1:0] exp_match);
    int sa [S], rx [S];
    @(negedge clk); search_en = 1; search_key = KEY;
    for (int s = 0; s < S; s++) begin
      #1ps;
      sa[s] = 0; rx[s] = 0;
      for (int r = 0; r < R; r++) sa[s] += (s == 0) ? int'(search_en) : int'(stage_out[r][s-1]);
      for (int l = 0; l < L; l++) rx[s] += int'(lsl_en[l][s]);
      @(negedge clk); search_en = 0; search_key = '0;
    end
    $display("%-22s segment 1/2/3: amplifiers on %0d/%0d/%0d, layers on %0d/%0d/%0d, match=%h",
             name, sa[0], sa[1], sa[2], rx[0], rx[1], rx[2], match);
    for (int s = 0; s < S; s++) begin
      checks += 2;
      if (sa[s] != exp_sa[s]) begin failures++; $display("  segment %0d amplifiers %0d, expected %0d", s+1, sa[s], exp_sa[s]); end
      if (rx[s] != exp_rx[s]) begin failures++; $display("  segment %0d layers %0d, expected %0d", s+1, rx[s], exp_rx[s]); end
    end
    checks++;
    if (!match_valid || match !== exp_match) begin failures++; $display("  match %h, expected %h", match, exp_match); end
    @(negedge clk);
  endtask

  initial begin
    logic [K-1:0] w;
    rst_n = 0; pre_n = 1; search_en = 0; search_key = '0; we = 0; waddr = '0; wdata = '0;
    // Every word differs from KEY in its first segment.
    for (int a = 0; a < R; a++) begin
      w = K'($urandom);
      w[0 +: B] = KEY[0 +: B] ^ B'(1 + a % ((1 << B) - 1));
      write_word(a, w);
    end
    @(negedge clk); rst_n = 1;

    // Four single-line runs on word 0.
    for (int m = S; m >= 0; m--) begin
      int esa [S], erx [S];
      write_word(0, partial(m, 0));
      esa[0] = R;  erx[0] = L;
      esa[1] = (m >= 1); erx[1] = (m >= 1);
      esa[2] = (m >= 2); erx[2] = (m >= 2);
      run($sformatf("line 0, %0d segments", m), esa, erx, (m == S) ? R'(1) : '0);
    end

    // Fixed 8-line pattern in layer 0.
    for (int r = 0; r < LAYER_ROWS; r++) begin
      int m;
      case (r) 0: m = 3; 1: m = 2; 2, 4, 6: m = 1; default: m = 0; endcase
      write_word(r, partial(m, r % B));
    end
    run("layer 0, 8-line pattern", '{R, 5, 2}, '{L, 1, 1}, R'(1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
