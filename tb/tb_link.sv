// tb_link: a link must delay its input by exactly LAT enabled clocks (LAT = 0 is a
// wire) and hold while en is low. Checked for LAT = 0, 1 and 4 against a queue.
module tb_link;
  import mcssta_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  delay_t d, q0, q1, q4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  link #(.LAT(0)) dut0 (.clk, .rst_n, .en, .at_i(d), .at_o(q0));
  link #(.LAT(1)) dut1 (.clk, .rst_n, .en, .at_i(d), .at_o(q1));
  link #(.LAT(4)) dut4 (.clk, .rst_n, .en, .at_i(d), .at_o(q4));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    delay_t hist [$];
    int stalls = 0;
    d = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5; i++) hist.push_front('0);   // reset contents
    for (int n = 0; n < 2000; n++) begin
      d  = delay_t'($urandom);
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (q0 != d) failures++;
      @(posedge clk);
      if (en) hist.push_front(d);
      else stalls++;
      #1;
      checks += 2;
      if (q1 != hist[0]) begin failures++; if (failures < 5) $display("LAT1 got %0d exp %0d", q1, hist[0]); end
      if (q4 != hist[3]) begin failures++; if (failures < 5) $display("LAT4 got %0d exp %0d", q4, hist[3]); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
