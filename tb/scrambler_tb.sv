// scrambler_tb: drives random plain text words, with idle cycles and frame
// starts, into both forms of the scrambler at once (PIPELINE = 0 and 1) and
// compares every crypto word with plain text XOR key from the bit-serial
// reference model. The expected word is looked up exactly 1 clock (without
// pipelining) or 2 clocks (with pipelining) after the word went in, so the
// latency and the one-word-per-clock rate are checked with the data.
module scrambler_tb;
  import scr_ref_pkg::*;

  localparam int unsigned W = 8;
  localparam int NCYC = 4000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  logic [W-1:0] din = '0;
  logic         din_valid = 1'b0;
  logic         din_sync = 1'b0;
  logic [W-1:0] dout0, dout1;
  logic         dv0, dv1, ds0, ds1;

  int checks = 0;
  int failures = 0;

  scrambler #(.W(W), .PIPELINE(1'b0)) dut0 (
    .clk, .rst_n, .din, .din_valid, .din_sync,
    .dout(dout0), .dout_valid(dv0), .dout_sync(ds0)
  );
  scrambler #(.W(W), .PIPELINE(1'b1)) dut1 (
    .clk, .rst_n, .din, .din_valid, .din_sync,
    .dout(dout1), .dout_valid(dv1), .dout_sync(ds1)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  exp_t hist[NCYC];

  function automatic exp_t past(int k, int lat);
    exp_t e;
    e.valid = 1'b0;
    e.sync  = 1'b0;
    e.data  = '0;
    if (k - lat >= 0) e = hist[k - lat];
    return e;
  endfunction

  task automatic compare(input string name, input exp_t e,
                         input logic [W-1:0] d, input logic v, input logic s);
    checks++;
    if (v !== e.valid || s !== e.sync || (e.valid && d !== e.data[W-1:0])) begin
      failures++;
      if (failures < 10)
        $display("%s t=%0t: got %h/%b/%b expected %h/%b/%b", name, $time,
                 d, v, s, e.data[W-1:0], e.valid, e.sync);
    end
  endtask

  initial begin
    pn_ref m;
    automatic int    n_sync = 0;
    automatic int    n_idle = 0;
    m = new(16);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCYC; k++) begin
      @(negedge clk);
      compare("flat", past(k, 1), dout0, dv0, ds0);
      compare("pipe", past(k, 2), dout1, dv1, ds1);
      din       = W'($urandom);
      din_valid = (k < 3) || ($urandom_range(0, 4) != 0);
      din_sync  = din_valid && ((k == 0) || ($urandom_range(0, 60) == 0));
      hist[k].valid = din_valid;
      hist[k].sync  = din_sync;
      hist[k].data  = '0;
      if (din_valid) begin
        if (din_sync) begin
          m.reseed();
          n_sync++;
        end
        hist[k].data = 32'(din) ^ m.word(W);
      end else begin
        n_idle++;
      end
    end
    if (n_sync < 2 || n_idle == 0) begin
      failures++;
      $display("frame starts %0d idle cycles %0d: not all exercised", n_sync, n_idle);
    end
    $display("frame starts %0d, idle cycles %0d", n_sync, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
