// tb_dglc: checks one DGLC per clock against a reference built from separate
// arc delay generators with the same parameters and seeds:
//     at_o(t+1) = max/min_k sat(at_i[k](t) + delay_k(t)).
// Random input arrival times (some close to the top of the range, so that the
// saturating adders act), both comparator modes, random stalls, and a one-input
// (inverter) DGLC alongside the two-input one.
module tb_dglc;
  import mcssta_pkg::*;
  localparam logic [63:0] S0 = 64'h1111_2222_3333_4444, S1 = 64'h5555_6666_7777_8888;

  logic clk = 0, rst_n = 0, en = 0, mode_min = 0;
  delay_t at_in [MAX_FANIN];
  delay_t y2, y1, r0, r1, ri;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dglc #(.N_IN(2), .MEAN({16'd280, 16'd250}), .SIGMA({16'd28, 16'd25}), .SEED({S1, S0})) dut2 (
    .clk, .rst_n, .en, .mode_min, .at_i(at_in), .at_o(y2));
  dglc #(.N_IN(1), .MEAN({16'd0, 16'd180}), .SIGMA({16'd0, 16'd18}), .SEED({S1, S1})) dut1 (
    .clk, .rst_n, .en, .mode_min, .at_i(at_in), .at_o(y1));

  arc_delay_gen #(.MEAN(16'd250), .SIGMA(16'd25), .SEED(S0)) ref0 (.clk, .rst_n, .en, .delay_o(r0));
  arc_delay_gen #(.MEAN(16'd280), .SIGMA(16'd28), .SEED(S1)) ref1 (.clk, .rst_n, .en, .delay_o(r1));
  arc_delay_gen #(.MEAN(16'd180), .SIGMA(16'd18), .SEED(S1)) refi (.clk, .rst_n, .en, .delay_o(ri));

  function automatic int sat_add(int a, int b);
    return (a + b > 65535) ? 65535 : a + b;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e2, e1, s0, s1, n_sat = 0, n_stall = 0, n_min = 0, n_max = 0;
    logic was_en;
    at_in[0] = '0; at_in[1] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      at_in[0] = (n % 97 == 5) ? 16'hFF80 : delay_t'($urandom_range(0, 2000));
      at_in[1] = delay_t'($urandom_range(0, 2000));
      mode_min = (n >= 2500);
      en       = ($urandom_range(0, 7) != 0);
      was_en   = en;
      s0 = sat_add(int'(at_in[0]), int'(r0));
      s1 = sat_add(int'(at_in[1]), int'(r1));
      if (en && s0 == 65535) n_sat++;
      e2 = mode_min ? ((s0 < s1) ? s0 : s1) : ((s0 > s1) ? s0 : s1);
      e1 = sat_add(int'(at_in[0]), int'(ri));
      @(posedge clk);
      #1;
      if (!was_en) begin n_stall++; continue; end
      if (mode_min) n_min++; else n_max++;
      checks += 2;
      if (int'(y2) != e2) begin
        failures++;
        if (failures < 5) $display("n=%0d mode %0d: got %0d exp %0d", n, mode_min, y2, e2);
      end
      if (int'(y1) != e1) failures++;
    end
    checks++;
    if (n_sat == 0 || n_stall == 0 || n_min == 0 || n_max == 0) begin
      failures++;
      $display("not exercised: sat %0d stall %0d min %0d max %0d", n_sat, n_stall, n_min, n_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
