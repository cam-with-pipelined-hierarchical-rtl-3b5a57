// tb_cam_cell: exhaustive check of the NOR CAM cell.
// For both stored values and all four search-rail combinations it checks
// the miss output against the cell truth table (miss when the driven rail
// disagrees with the stored bit, no pull-down when both rails are low)
// and checks that a write lands only when we is high.
module tb_cam_cell;
  logic clk = 0, we, wd, sl, slb, d, miss;
  int checks = 0, failures = 0;

  cam_cell dut (.clk(clk), .we(we), .wd(wd), .sl(sl), .slb(slb), .d(d), .miss(miss));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    we = 0; wd = 0; sl = 0; slb = 0;
    for (int v = 0; v < 2; v++) begin
      @(negedge clk); we = 1; wd = v[0];
      @(negedge clk); we = 0; wd = ~v[0];
      checks++; if (d !== v[0]) begin failures++; $display("write %0d: d=%0b", v, d); end
      @(negedge clk);  // wd toggled with we low: must not be written
      checks++; if (d !== v[0]) begin failures++; $display("hold %0d: d=%0b", v, d); end
      for (int c = 0; c < 4; c++) begin
        sl = c[1]; slb = c[0]; #1;
        // truth table: SL=0,D=1 -> MISS; SL=1,D=0 -> MISS; equal -> MATCH
        if (sl && !slb)      exp = (v == 0);
        else if (!sl && slb) exp = (v == 1);
        else if (!sl && !slb) exp = 0;
        else                 exp = 1;   // both rails high: one path always conducts
        checks++;
        if (miss !== exp) begin failures++; $display("d=%0d sl=%0b slb=%0b miss=%0b exp=%0b", v, sl, slb, miss, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
