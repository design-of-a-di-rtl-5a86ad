// tb_bundled_delay: feeds random pulses into the delay element (DELAY 3,
// the default, and DELAY 7) and checks that each output equals its input
// as it was that many cycles earlier.
module tb_bundled_delay;
  logic clk = 0, rst_n = 0, in = 0, out3, out7;
  logic [15:0] hist;
  int checks = 0, failures = 0;

  bundled_delay              dut3 (.clk(clk), .rst_n(rst_n), .in(in), .out(out3));
  bundled_delay #(.DELAY(7)) dut7 (.clk(clk), .rst_n(rst_n), .in(in), .out(out7));

  always #5 clk = !clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) in = !in;
      @(posedge clk);
      hist = {hist[14:0], in};
      #1;
      checks += 2;
      if (out3 !== hist[2]) begin failures++; $display("FAIL delay 3 at %0d", n); end
      if (out7 !== hist[6]) begin failures++; $display("FAIL delay 7 at %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
