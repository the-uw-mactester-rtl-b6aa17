// tb_fine_delay: the fine delay line's step size.
// For each tap the time from a rising trig_in to the rising trig_out must
// be (tap + 1) * 12 ns, and every tap must stay under one 100 ns bus clock.
module tb_fine_delay;
  logic       trig_in = 1'b0, trig_out;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  fine_delay dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, dt;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #200;
      t0 = $realtime;
      trig_in = 1'b1;
      @(posedge trig_out);
      dt = $realtime - t0;
      checks++;
      if (dt < (s + 1) * 12.0 - 0.01 || dt > (s + 1) * 12.0 + 0.01) begin
        failures++;
        $display("FAIL tap %0d: delay %0.2f ns", s, dt);
      end
      checks++;
      if (dt >= 100.0) begin failures++; $display("FAIL tap %0d longer than a bus clock", s); end
      #150 trig_in = 1'b0;
      #150;
      checks++;
      if (trig_out !== 1'b0) begin failures++; $display("FAIL tap %0d falling edge", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
