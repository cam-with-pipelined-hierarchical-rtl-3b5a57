// tb_ml_layer: cycle-accurate test of an 18 x 8 layer with gated local
// search lines.
// A word-level reference model gives every line's three registered stage
// results and the expected receiver enables (stage 1: search present;
// stage s+1: some line of the layer matched stage s). The testbench first
// loads the original circuit's test pattern (line 0 matches all three stages,
// line 1 the first two, lines 2, 4 and 6 only the first, the others none)
// and runs one search through it, then runs back-to-back random searches
// with writes and precharge. It counts how often each receiver was
// switched off while a search was in flight and fails if that never
// happened.
module tb_ml_layer;
  localparam int R = 8, S = 3, B = 6, K = S * B;
  logic clk = 0, rst_n, en1, pre_n;
  logic [R-1:0] we_row;
  logic [K-1:0] wd, gsl;
  logic [R-1:0][S-1:0] stage_out, exp;
  logic [R-1:0] match;
  logic [S-1:0] lsl_en;
  logic [K-1:0] mem [R];
  logic [K-1:0] keyh [S];
  logic [S-1:0] enh;   // enh[j]: a search entered j cycles ago
  int checks = 0, failures = 0;
  int rx_off2 = 0, rx_off3 = 0, full = 0;

  ml_layer #(.ROWS(R), .STAGES(S), .STAGE_BITS(B)) dut (.clk(clk), .rst_n(rst_n), .we_row(we_row),
    .wd(wd), .gsl(gsl), .en1(en1), .pre_n(pre_n), .stage_out(stage_out), .match(match), .lsl_en(lsl_en));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic [K-1:0] key, input logic [R-1:0] w,
                      input logic [K-1:0] d, input logic p);
    logic [R-1:0][S-1:0] nxt;
    logic [S-1:0] xen;
    logic [R-1:0] xm;
    for (int s = S-1; s > 0; s--) begin keyh[s] = keyh[s-1]; enh[s] = enh[s-1]; end
    keyh[0] = key;
    enh[0] = e;
    en1 = e; we_row = w; wd = d; pre_n = p;
    for (int s = 0; s < S; s++) gsl[s*B +: B] = keyh[s][s*B +: B];
    // expected receiver enables in this cycle
    xen[0] = e;
    for (int s = 1; s < S; s++) begin
      xen[s] = 0;
      for (int r = 0; r < R; r++) xen[s] |= exp[r][s-1];
    end
    #1;
    checks++;
    if (lsl_en !== xen) begin failures++; $display("%0t: lsl_en=%b exp=%b", $time, lsl_en, xen); end
    // a search in flight in stage s with that stage's receivers off
    if (enh[1] && !xen[1]) rx_off2++;
    if (enh[2] && !xen[2]) rx_off3++;
    for (int r = 0; r < R; r++)
      for (int s = 0; s < S; s++)
        nxt[r][s] = p & (s == 0 ? e : exp[r][s-1]) & (mem[r][s*B +: B] == keyh[s][s*B +: B]);
    @(posedge clk);
    exp = nxt;
    for (int r = 0; r < R; r++) if (w[r]) mem[r] = d;
    @(negedge clk);
    checks++;
    for (int r = 0; r < R; r++) xm[r] = exp[r][S-1];
    if (stage_out !== exp || match !== xm) begin
      failures++; $display("%0t: stage_out=%h exp=%h match=%b", $time, stage_out, exp, match);
    end
    if (|match) full++;
  endtask


  initial begin
    logic [K-1:0] key, k;
    rst_n = 0; en1 = 0; pre_n = 1; we_row = '0; wd = '0; gsl = '0;
    enh = '0;
    for (int s = 0; s < S; s++) keyh[s] = '0;
    exp = '0;
    key = 18'h15A3C;
    // Reference pattern: stages matched per line 3,2,1,0,1,0,1,0.
    for (int r = 0; r < R; r++) begin
      int m;
      case (r) 0: m = 3; 1: m = 2; 2, 4, 6: m = 1; default: m = 0; endcase
      k = key;
      if (m < 3) k[m*B + (r % B)] = ~k[m*B + (r % B)];
      mem[r] = k;
      @(negedge clk); we_row = R'(1) << r; wd = k;
    end
    @(negedge clk); we_row = '0;
    @(negedge clk); rst_n = 1;
    checks++; if (stage_out !== '0) begin failures++; $display("reset: %h", stage_out); end

    step(1, key, '0, '0, 1);
    checks++; if (stage_out[R-1:0] !== exp) failures++;
    // after edge 1: lines 0,1,2,4,6 matched stage 1
    begin
      logic [R-1:0] s1;
      for (int r = 0; r < R; r++) s1[r] = stage_out[r][0];
      checks++;
      if (s1 !== 8'b0101_0111) begin failures++; $display("pattern stage 1: %b", s1); end
    end
    step(0, '0, '0, '0, 1);
    checks++; if (stage_out[0][1] !== 1 || stage_out[1][1] !== 1 || stage_out[2][1] !== 0) failures++;
    step(0, '0, '0, '0, 1);
    checks++; if (match !== 8'b0000_0001) begin failures++; $display("pattern match=%b", match); end
    step(0, '0, '0, '0, 1);

    for (int i = 0; i < 6000; i++) begin
      int r;
      r = $urandom_range(0, R-1);
      case ($urandom_range(0, 3))
        0: k = mem[r];
        1: begin k = mem[r]; k[12 +: 6] = 6'($urandom); end
        2: begin k = mem[r]; k[6 +: 12] = 12'($urandom); end
        default: k = K'($urandom);
      endcase
      step($urandom_range(0, 4) != 0, k,
           ($urandom_range(0, 15) == 0) ? R'(1) << $urandom_range(0, R-1) : '0,
           K'($urandom), $urandom_range(0, 19) != 0);
    end
    if (rx_off2 == 0 || rx_off3 == 0 || full == 0) begin
      failures++; $display("mechanism not exercised");
    end
    $display("stage-2 receivers off during a search %0d times, stage-3 %0d times, matches %0d",
             rx_off2, rx_off3, full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
