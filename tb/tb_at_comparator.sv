// tb_at_comparator: random and corner vectors against a sorted-reference max/min
// for a 2-input and a 5-input comparator in both modes.
module tb_at_comparator;
  import mcssta_pkg::*;
  logic   mode_min;
  delay_t a2 [2], a5 [5];
  delay_t y2, y5;
  int checks = 0, failures = 0;

  at_comparator #(.N(2)) dut2 (.mode_min(mode_min), .at_i(a2), .at_o(y2));
  at_comparator #(.N(5)) dut5 (.mode_min(mode_min), .at_i(a5), .at_o(y5));

  function automatic delay_t ref_pick(delay_t v [5], int n, logic mn);
    delay_t s [$];
    for (int i = 0; i < n; i++) s.push_back(v[i]);
    s.sort();
    return mn ? s[0] : s[n-1];
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    delay_t v [5];
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < 5; i++) begin
        v[i] = (n < 100) ? delay_t'($urandom_range(0, 3)) : delay_t'($urandom);
        if (n % 50 == 7) v[i] = 16'hFFFF;
        a5[i] = v[i];
      end
      a2[0] = v[0];
      a2[1] = v[1];
      mode_min = n[0];
      #1;
      checks += 2;
      if (y5 != ref_pick(v, 5, mode_min)) begin
        failures++;
        if (failures < 5) $display("N=5 mode %0d: got %0d exp %0d", mode_min, y5, ref_pick(v, 5, mode_min));
      end
      if (y2 != ref_pick(v, 2, mode_min)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
