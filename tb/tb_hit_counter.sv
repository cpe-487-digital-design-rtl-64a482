// tb_hit_counter: drives random clear / inc pulses and compares the count
// with a reference counter, including wrap-around past 255.
module tb_hit_counter;
  logic       clk = 1'b0, rst = 1'b1, clear = 1'b0, inc = 1'b0;
  logic [7:0] count;
  int         checks = 0, failures = 0, ref_count = 0;

  hit_counter #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    checks++; if (count != 0) failures++;
    for (int i = 0; i < 3000; i++) begin
      // long runs of increments so the counter wraps at least once
      clear <= (i > 1200) && ($urandom_range(0, 99) < 3);
      inc   <= (i < 1200) || ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (clear)    ref_count = 0;
      else if (inc) ref_count = (ref_count + 1) % 256;
      #1;
      checks++;
      if (int'(count) != ref_count) begin
        failures++;
        $display("FAIL i=%0d got %0d expected %0d", i, count, ref_count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
