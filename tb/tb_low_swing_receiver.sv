// tb_low_swing_receiver: checks that the local search lines follow the
// global search lines on both rails while enabled and that both rails are
// held low while the receiver is off.
module tb_low_swing_receiver;
  localparam int W = 6;
  logic en;
  logic [W-1:0] gsl, lsl, lslb;
  int checks = 0, failures = 0;

  low_swing_receiver #(.W(W)) dut (.en(en), .gsl(gsl), .lsl(lsl), .lslb(lslb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 * (1 << W); i++) begin
      {en, gsl} = (W+1)'(i);
      #1;
      checks++;
      if (en) begin
        if (lsl !== gsl || lslb !== ~gsl) begin
          failures++; $display("on: gsl=%h lsl=%h lslb=%h", gsl, lsl, lslb);
        end
      end else if (lsl !== '0 || lslb !== '0) begin
        failures++; $display("off: gsl=%h lsl=%h lslb=%h", gsl, lsl, lslb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
