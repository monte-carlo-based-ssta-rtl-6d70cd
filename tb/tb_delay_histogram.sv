// tb_delay_histogram: random samples (some below BASE, some beyond the last bin)
// are binned by a reference model; all bins and the sample count must match after
// the run. clear_i must zero everything, and a 4-bit-counter instance must
// saturate at 15 instead of wrapping.
module tb_delay_histogram;
  import mcssta_pkg::*;
  localparam int unsigned NB = 16;
  logic clk = 0, rst_n = 0, clr = 0, vld = 0;
  delay_t smp;
  logic [3:0] addr;
  logic [31:0] rd, ns;
  logic [3:0] rd_s, ns_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_histogram #(.N_BINS(NB), .CNT_W(32), .BASE(16'd100), .SHIFT(3)) dut (
    .clk, .rst_n, .clear_i(clr), .sample_valid_i(vld), .sample_i(smp),
    .rd_addr_i(addr), .rd_data_o(rd), .n_samples_o(ns));
  delay_histogram #(.N_BINS(NB), .CNT_W(4), .BASE(16'd100), .SHIFT(3)) dut_s (
    .clk, .rst_n, .clear_i(clr), .sample_valid_i(vld), .sample_i(smp),
    .rd_addr_i(addr), .rd_data_o(rd_s), .n_samples_o(ns_s));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int refb [NB];
    int nv, b;
    for (int i = 0; i < NB; i++) refb[i] = 0;
    nv = 0;
    smp = '0; addr = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vld = ($urandom_range(0, 4) != 0);
      smp = delay_t'($urandom_range(60, 260));
      if (vld) begin
        nv++;
        if (smp < 100) b = 0;
        else b = (int'(smp) - 100) / 8;
        if (b > NB - 1) b = NB - 1;
        refb[b]++;
      end
    end
    @(negedge clk);
    vld = 0;
    for (int i = 0; i < NB; i++) begin
      addr = 4'(i);
      #1;
      checks += 2;
      if (rd != 32'(refb[i])) begin failures++; $display("bin %0d: got %0d exp %0d", i, rd, refb[i]); end
      if (rd_s != ((refb[i] > 15) ? 4'd15 : 4'(refb[i]))) begin failures++; $display("sat bin %0d: got %0d", i, rd_s); end
    end
    checks += 2;
    if (ns != 32'(nv)) begin failures++; $display("count got %0d exp %0d", ns, nv); end
    if (ns_s != 4'd15) failures++;
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int i = 0; i < NB; i++) begin
      addr = 4'(i);
      #1;
      checks++;
      if (rd != 0) failures++;
    end
    checks++;
    if (ns != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
