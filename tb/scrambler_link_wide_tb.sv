// scrambler_link_wide_tb: the end-to-end test of scrambler_link_tb run with
// 32-bit words (32 key bits per clock) instead of 8, to show that the word
// width is a working parameter. Both forms (PIPELINE = 0 and 1) run side by
// side with the same stimulus.
//
// Random plain text words go in with idle cycles and frame starts, some of the
// frame starts in the middle of running traffic. For each form the test checks
// that the crypto word equals plain text XOR key of the bit-serial reference
// model exactly L clocks after the word went in (L = 1 or 2), that the
// recovered plain text equals the plain text exactly 2L clocks after, and that
// the crypto word actually differs from the plain text on the line. It counts
// how often each mechanism happened: words through each form, frame starts
// (key generator reseeds), frame restarts in mid-traffic and idle cycles in
// which the generators hold; each must have happened.
module scrambler_link_wide_tb;
  import scr_ref_pkg::*;

  localparam int unsigned W = 32;
  localparam int NCYC = 6000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  logic [W-1:0] plain_in = '0;
  logic         plain_valid = 1'b0;
  logic         frame_start = 1'b0;

  logic [W-1:0] c0, c1, p0, p1;
  logic         cv0, cv1, cs0, cs1, pv0, pv1, ps0, ps1;

  int checks = 0;
  int failures = 0;

  scrambler_link #(.W(W), .PIPELINE(1'b0)) dut0 (
    .clk, .rst_n, .plain_in, .plain_valid, .frame_start,
    .crypto_out(c0), .crypto_valid(cv0), .crypto_sync(cs0),
    .plain_out(p0), .plain_out_valid(pv0), .plain_out_sync(ps0)
  );
  scrambler_link #(.W(W), .PIPELINE(1'b1)) dut1 (
    .clk, .rst_n, .plain_in, .plain_valid, .frame_start,
    .crypto_out(c1), .crypto_valid(cv1), .crypto_sync(cs1),
    .plain_out(p1), .plain_out_valid(pv1), .plain_out_sync(ps1)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  exp_t crypt_hist[NCYC];
  exp_t plain_hist[NCYC];

  function automatic exp_t past(ref exp_t h[NCYC], input int k, input int lat);
    exp_t e;
    e.valid = 1'b0;
    e.sync  = 1'b0;
    e.data  = '0;
    if (k - lat >= 0) e = h[k - lat];
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

  int n_words_flat = 0;
  int n_words_pipe = 0;
  int n_differ     = 0;

  always @(negedge clk) begin
    if (pv0) n_words_flat++;
    if (pv1) n_words_pipe++;
  end

  initial begin
    pn_ref m;
    automatic int    n_sync = 0;
    automatic int    n_resync = 0;
    automatic int    n_idle = 0;
    automatic int    n_sent = 0;
    m = new(16);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCYC; k++) begin
      @(negedge clk);
      compare("crypto flat", past(crypt_hist, k, 1), c0, cv0, cs0);
      compare("crypto pipe", past(crypt_hist, k, 2), c1, cv1, cs1);
      compare("plain flat",  past(plain_hist, k, 2), p0, pv0, ps0);
      compare("plain pipe",  past(plain_hist, k, 4), p1, pv1, ps1);
      if (cv1 && c1 != past(plain_hist, k, 2).data[W-1:0]) n_differ++;

      plain_in    = W'($urandom);
      plain_valid = (k < 5) || ($urandom_range(0, 5) != 0);
      frame_start = plain_valid && ((k == 0) || ($urandom_range(0, 200) == 0));
      crypt_hist[k].valid = plain_valid;
      crypt_hist[k].sync  = frame_start;
      crypt_hist[k].data  = '0;
      plain_hist[k]       = crypt_hist[k];
      plain_hist[k].data  = 32'(plain_in);
      if (plain_valid) begin
        n_sent++;
        if (frame_start) begin
          m.reseed();
          n_sync++;
          if (k > 0) n_resync++;
        end
        crypt_hist[k].data = 32'(plain_in) ^ m.word(W);
      end else begin
        n_idle++;
      end
    end
    // Drain the pipelines.
    @(negedge clk);
    plain_valid = 1'b0;
    frame_start = 1'b0;
    repeat (5) @(negedge clk);

    $display("words sent %0d, through flat form %0d, through pipelined form %0d",
             n_sent, n_words_flat, n_words_pipe);
    $display("frame starts %0d (mid-traffic %0d), idle cycles %0d, crypto != plain %0d",
             n_sync, n_resync, n_idle, n_differ);
    checks++;
    if (n_words_flat != n_sent || n_words_pipe != n_sent) begin
      failures++;
      $display("word count mismatch");
    end
    checks++;
    if (n_sync == 0 || n_resync == 0 || n_idle == 0 || n_differ < n_sent / 2) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
