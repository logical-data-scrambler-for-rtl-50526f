// word_register_tb: random words, valid and frame-start flags into the data
// register; checks one clock of latency, that the word is held while d_valid
// is low, that q_sync is only set for a valid word, and that reset clears it.
module word_register_tb;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  logic [W-1:0] d = '0;
  logic         d_valid = 1'b0;
  logic         d_sync = 1'b0;
  logic [W-1:0] q;
  logic         q_valid;
  logic         q_sync;

  int checks = 0;
  int failures = 0;

  word_register #(.W(W)) dut (.clk, .rst_n, .d, .d_valid, .d_sync, .q, .q_valid, .q_sync);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(input logic [W-1:0] eq, input logic ev, input logic es);
    checks++;
    if (q !== eq || q_valid !== ev || q_sync !== es) begin
      failures++;
      if (failures < 10)
        $display("t=%0t q=%h/%b/%b expected %h/%b/%b", $time, q, q_valid, q_sync, eq, ev, es);
    end
  endtask

  initial begin
    automatic logic [W-1:0] held = '0;
    automatic logic         pv = 1'b0;
    automatic logic         ps = 1'b0;
    automatic int           holds = 0;
    #2;
    expect3('0, 1'b0, 1'b0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      expect3(held, pv, ps);
      d       = W'($urandom);
      d_valid = ($urandom_range(0, 2) != 0);
      d_sync  = ($urandom_range(0, 4) == 0);
      if (!d_valid) holds++;
      pv = d_valid;
      ps = d_valid & d_sync;
      if (d_valid) held = d;
    end
    @(negedge clk);
    expect3(held, pv, ps);
    rst_n = 1'b0;
    #1;
    expect3('0, 1'b0, 1'b0);
    if (holds == 0) begin
      failures++;
      $display("hold never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
