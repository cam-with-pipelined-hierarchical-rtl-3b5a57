// tb_cam_18x64: end-to-end test of the 18 x 64 CAM at its default size.
//
// A word-level reference model holds the 64 stored words and, per cycle,
// every word's three registered stage results (stage s of a search sees
// the key presented s cycles earlier and the memory contents of that
// cycle), the expected receiver enables of every layer and the expected
// match_valid. The test
//   1. fills the array and runs the original circuit's four single-line test patterns
//      (the key agrees with 3, 2, 1 and 0 leading stages of one word),
//      checking that each stage result appears one cycle after the one
//      before and the full match three cycles after the search;
//   2. runs back-to-back random searches biased towards stored words and
//      their near misses, with random writes and precharge cycles.
// Every cycle all outputs are compared with the model. It counts how
// often each mechanism occurred (stage 2 / stage 3 switched off after a
// miss, a layer's stage-2 / stage-3 receivers off during a search, full
// matches, multiple matches, searches with no match, back-to-back
// searches, writes while searches were in flight, precharge suppressing a
// match) and counts a failure for any that never did.
module tb_cam_18x64;
  import cam_pkg::*;
  localparam int R = ML_ROWS, S = STAGES, B = STAGE_BITS, K = KEY_BITS;
  localparam int L = R / LAYER_ROWS;
  localparam int ADDR_BITS = $clog2(R);

  logic clk = 0, rst_n, pre_n, search_en, we, match_valid;
  logic [K-1:0] search_key, wdata;
  logic [ADDR_BITS-1:0] waddr;
  logic [R-1:0] match;
  logic [R-1:0][S-1:0] stage_out, exp;
  logic [L-1:0][S-1:0] lsl_en;

  logic [K-1:0] mem [R];
  logic [K-1:0] keyh [S];
  logic [S:0]   enh;     // enh[j]: a search entered j cycles ago
  int checks = 0, failures = 0;

  typedef enum int {OFF2, OFF3, RX2, RX3, FULL, MULTI, NONE, B2B, WR_INFLIGHT, PRE, NMECH} mech_e;
  int cnt [NMECH];
  string mname [NMECH] = '{"stage2_off", "stage3_off", "rx2_off", "rx3_off", "full_match",
                           "multi_match", "no_match", "back_to_back", "write_in_flight", "precharge"};

  cam_18x64 dut (
    .clk(clk), .rst_n(rst_n), .pre_n(pre_n),
    .search_en(search_en), .search_key(search_key), .match(match), .match_valid(match_valid),
    .we(we), .waddr(waddr), .wdata(wdata),
    .stage_out(stage_out), .lsl_en(lsl_en)
  );

  always #2.5ns clk = ~clk;   // 200 MHz

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic [K-1:0] key, input logic w,
                      input logic [ADDR_BITS-1:0] a, input logic [K-1:0] d, input logic p);
    logic [R-1:0][S-1:0] nxt;
    logic [L-1:0][S-1:0] xen;
    logic [R-1:0] xm;
    int nm;
    for (int s = S-1; s > 0; s--) keyh[s] = keyh[s-1];
    keyh[0] = key;
    enh = {enh[S-1:0], e};
    search_en = e; search_key = key; we = w; waddr = a; wdata = d; pre_n = p;
    for (int l = 0; l < L; l++) begin
      xen[l][0] = e;
      for (int s = 1; s < S; s++) begin
        xen[l][s] = 0;
        for (int j = 0; j < LAYER_ROWS; j++) xen[l][s] |= exp[l*LAYER_ROWS + j][s-1];
        if (enh[s] && !xen[l][s]) cnt[s == 1 ? RX2 : RX3]++;
      end
    end
    #1ps;
    checks++;
    if (lsl_en !== xen) begin failures++; $display("%0t: lsl_en=%h exp=%h", $time, lsl_en, xen); end
    for (int r = 0; r < R; r++)
      for (int s = 0; s < S; s++) begin
        nxt[r][s] = p & (s == 0 ? e : exp[r][s-1]) & (mem[r][s*B +: B] == keyh[s][s*B +: B]);
        if (s > 0 && p && (s == 1 ? e : exp[r][s-2]) && !nxt[r][s-1])
          cnt[s == 1 ? OFF2 : OFF3]++;
        if (!p && (s == 0 ? e : exp[r][s-1]) && (mem[r][s*B +: B] == keyh[s][s*B +: B]))
          cnt[PRE]++;
      end
    if (e && enh[1]) cnt[B2B]++;
    if (w && |enh[S-1:0]) cnt[WR_INFLIGHT]++;
    @(posedge clk);
    exp = nxt;
    if (w) mem[a] = d;
    @(negedge clk);
    for (int r = 0; r < R; r++) xm[r] = exp[r][S-1];
    checks++;
    if (stage_out !== exp || match !== xm || match_valid !== enh[S-1]) begin
      failures++;
      $display("%0t: match=%h exp=%h valid=%b exp=%b", $time, match, xm, match_valid, enh[S-1]);
    end
    if (match_valid) begin
      nm = $countones(match);
      if (nm == 0) cnt[NONE]++;
      if (nm >= 1) cnt[FULL]++;
      if (nm >= 2) cnt[MULTI]++;
    end
  endtask

  task automatic idle();
    step(0, '0, 0, '0, '0, 1);
  endtask

  initial begin
    logic [K-1:0] k;
    int r;
    foreach (cnt[i]) cnt[i] = 0;
    rst_n = 0; pre_n = 1; search_en = 0; search_key = '0; we = 0; waddr = '0; wdata = '0;
    for (int s = 0; s < S; s++) keyh[s] = '0;
    enh = '0;
    exp = '0;
    // Fill the array (word r gets a pseudo-random value; words 40..43 share
    // their first stage with word 8 to make multiple partial matches).
    for (int i = 0; i < R; i++) begin
      mem[i] = K'($urandom);
      if (i >= 40 && i < 44) mem[i][0 +: B] = mem[8][0 +: B];
      if (i == 41) mem[i] = mem[8];
      @(negedge clk); we = 1; waddr = ADDR_BITS'(i); wdata = mem[i];
    end
    @(negedge clk); we = 0;
    @(negedge clk); rst_n = 1;
    checks++; if (stage_out !== '0 || match_valid !== 0) begin failures++; $display("reset"); end

    // 1. The four single-line patterns on word 8: 3, 2, 1, 0 matching stages.
    for (int m = 3; m >= 0; m--) begin
      k = mem[8];
      if (m < 3) k[m*B] = ~k[m*B];
      step(1, k, 0, '0, '0, 1);
      for (int c = 1; c <= S; c++) begin
        checks++;
        if (stage_out[8][c-1] !== (c <= m)) begin
          failures++; $display("pattern %0d: stage %0d = %b", m, c, stage_out[8][c-1]);
        end
        if (c == S) begin
          checks++;
          if (match_valid !== 1 || match[8] !== (m == 3)) begin
            failures++; $display("pattern %0d: latency/valid wrong", m);
          end
        end
        idle();
      end
    end

    // 2. Random traffic.
    for (int i = 0; i < 20000; i++) begin
      r = $urandom_range(0, R-1);
      case ($urandom_range(0, 4))
        0: k = mem[r];
        1: begin k = mem[r]; k[2*B +: B] = B'($urandom); end
        2: begin k = mem[r]; k[B +: 2*B] = (2*B)'($urandom); end
        3: k = mem[8];
        default: k = K'($urandom);
      endcase
      step($urandom_range(0, 4) != 0, k, $urandom_range(0, 15) == 0,
           ADDR_BITS'($urandom), ($urandom_range(0, 1) == 0) ? mem[8] : K'($urandom),
           $urandom_range(0, 29) != 0);
    end
    repeat (S) idle();

    for (int i = 0; i < NMECH; i++) begin
      $display("%-16s %0d", mname[i], cnt[i]);
      if (cnt[i] == 0) begin failures++; $display("mechanism %s never happened", mname[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
