// tb_lfsr_rng: checks the leap-forward LFSR RNG.
//  * Default 64-bit generator, 96 bits per clock: every output word is compared
//    with a bit-serial model written as the recurrence
//    a[n] = a[n-64] ^ a[n-63] ^ a[n-61] ^ a[n-60] over the bit history.
//  * en low must hold the output.
//  * An 8-bit instance (x^8+x^6+x^5+x^4+1, one bit per clock) must have period 255.
module tb_lfsr_rng;
  localparam int unsigned OUT_W = 96;
  localparam logic [63:0] SEED  = 64'h0123_4567_89AB_CDEF;

  logic clk = 0, rst_n = 0, en = 0;
  logic [OUT_W-1:0] rnd;
  logic [0:0] rnd8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_rng #(.W(64), .TAPS(64'hD800_0000_0000_0000), .OUT_W(OUT_W), .SEED(SEED)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .rnd_o(rnd));

  lfsr_rng #(.W(8), .TAPS(8'hB8), .OUT_W(1), .SEED(8'h01)) dut8 (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .rnd_o(rnd8));

  // Bit history of the model; hist[0] is the newest bit.
  bit hist [64];

  function automatic logic [OUT_W-1:0] model_word();
    logic [OUT_W-1:0] w;
    bit nb;
    for (int i = 0; i < OUT_W; i++) begin
      nb = hist[63] ^ hist[62] ^ hist[60] ^ hist[59];
      for (int j = 63; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = nb;
      w[i] = nb;
    end
    return w;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [OUT_W-1:0] exp_w, held;
    logic [7:0] s0, win;
    int period;
    for (int j = 0; j < 64; j++) hist[j] = SEED[j];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // word stream
    for (int n = 0; n < 300; n++) begin
      en <= 1'b1;
      @(posedge clk);
      #1;
      exp_w = model_word();
      checks++;
      if (rnd !== exp_w) begin
        failures++;
        if (failures < 5) $display("word %0d: got %h exp %h", n, rnd, exp_w);
      end
      // stall every 7th word for two clocks
      if (n % 7 == 3) begin
        en <= 1'b0;
        held = rnd;
        repeat (2) @(posedge clk);
        #1;
        checks++;
        if (rnd !== held) begin failures++; $display("stall did not hold"); end
      end
    end
    // 8-bit period: after 8 steps the last 8 output bits equal the state, so the
    // window of the last 8 bits repeats with the LFSR period.
    win = '0;
    repeat (8) begin @(posedge clk); #1; win = {win[6:0], rnd8[0]}; end
    s0 = win;
    period = 0;
    do begin
      @(posedge clk);
      #1;
      win = {win[6:0], rnd8[0]};
      period++;
    end while (win != s0 && period < 1000);
    checks++;
    if (period != 255) begin failures++; $display("period %0d, expected 255", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
