// tb_mlsa: exhaustive check of the match-line sense amplifier rules:
// output 0 in precharge (pre_n low) and when disabled, otherwise the
// match-line level.
module tb_mlsa;
  logic ml, enable, pre_n, out;
  int checks = 0, failures = 0;

  mlsa dut (.ml(ml), .enable(enable), .pre_n(pre_n), .out(out));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 8; i++) begin
      {pre_n, enable, ml} = i[2:0];
      #1;
      if (!pre_n)       exp = 0;   // precharge phase
      else if (!enable) exp = 0;   // stage switched off
      else              exp = ml;  // ML=1 -> 1, ML=0 -> 0
      checks++;
      if (out !== exp) begin failures++; $display("pre_n=%0b en=%0b ml=%0b out=%0b", pre_n, enable, ml, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
