// pn_lfsr_tb: checks the word-parallel PN generator first against two fixed
// key words worked out by hand from the seed, then against the bit-serial
// reference model: random advance and reseed patterns, the key word of every
// cycle compared, then a run of 2^16-1 words from the seed, after which the
// 16-stage generator must be back at its seed (a maximal-length sequence
// repeats after 2^16-1 bits, and 8 * (2^16-1) bits is a whole number of
// periods).
module pn_lfsr_tb;
  import scr_ref_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned PERIOD = 65535;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  logic         advance = 1'b0;
  logic         reseed = 1'b0;
  logic [W-1:0] keystream;

  int checks = 0;
  int failures = 0;

  pn_lfsr #(.W(W)) dut (.clk, .rst_n, .advance, .reseed, .keystream);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (PERIOD + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(input logic [W-1:0] exp, input string what);
    checks++;
    if (keystream !== exp) begin
      failures++;
      if (failures < 10) $display("%s: key %h, expected %h", what, keystream, exp);
    end
  endtask

  initial begin
    pn_ref        m;
    logic [W-1:0] first;
    logic [W-1:0] exp;
    automatic int           n_reseed = 0;
    m = new(16);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Fixed vector: from the all-ones seed the first two key words
    // (D0 = bit 0) are 8'h72 and 8'h89.
    #1;
    check_word(8'h72, "seed word 0");
    @(negedge clk);
    advance = 1'b1;
    #1;
    check_word(8'h72, "seed word 0, advancing");
    @(negedge clk);
    advance = 1'b0;
    #1;
    check_word(8'h89, "seed word 1");
    void'(m.word(W));

    // Random advance / reseed traffic.
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      advance = ($urandom_range(0, 3) != 0);
      reseed  = ($urandom_range(0, 40) == 0);
      #1;
      if (reseed) begin
        m.reseed();
        n_reseed++;
      end
      if (advance) begin
        exp = W'(m.word(W));
        check_word(exp, "random");
      end else begin
        // Key word shown without advancing: model must not move.
        automatic pn_ref peek = new(16);
        peek.s = m.s;
        exp = W'(peek.word(W));
        check_word(exp, "hold");
      end
    end
    if (n_reseed == 0) begin
      failures++;
      $display("no reseed happened");
    end

    // Full period from the seed.
    @(negedge clk);
    advance = 1'b1;
    reseed  = 1'b1;
    #1;
    first = keystream;
    m.reseed();
    exp = W'(m.word(W));
    check_word(exp, "period start");
    @(negedge clk);
    reseed = 1'b0;
    for (int unsigned i = 1; i < PERIOD; i++) begin
      #1;
      exp = W'(m.word(W));
      check_word(exp, "period");
      @(negedge clk);
    end
    // PERIOD words advanced: register is back at the seed.
    advance = 1'b0;
    #1;
    check_word(first, "after one period");
    checks++;
    if (m.s != '{1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1,
                 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1}) begin
      failures++;
      $display("model not back at seed after one period");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
