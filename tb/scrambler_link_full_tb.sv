// scrambler_link_full_tb: one complete frame through the scrambler link at
// its default parameters (8-bit words, pipelined form, 16-stage generator).
//
// The frame is 4 rows x 4080 bytes = 16320 words, the size of an OTN OTU
// frame, sent back to back at one word per clock with frame_start on the
// first word. Every crypto word is compared with plain text XOR key of the
// bit-serial reference model exactly 2 clocks after it went in, every
// recovered word with the plain text exactly 4 clocks after, and the whole
// frame must pass in 16320 + 4 clocks.
module scrambler_link_full_tb;
  import scr_ref_pkg::*;

  localparam int unsigned W = 8;
  localparam int FRAME = 4 * 4080;
  localparam int LAT_C = 2;
  localparam int LAT_P = 4;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  logic [W-1:0] plain_in = '0;
  logic         plain_valid = 1'b0;
  logic         frame_start = 1'b0;
  logic [W-1:0] crypto_out, plain_out;
  logic         crypto_valid, crypto_sync, plain_out_valid, plain_out_sync;

  int checks = 0;
  int failures = 0;

  scrambler_link dut (
    .clk, .rst_n, .plain_in, .plain_valid, .frame_start,
    .crypto_out, .crypto_valid, .crypto_sync,
    .plain_out, .plain_out_valid, .plain_out_sync
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (FRAME + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] plain_mem [FRAME];
  logic [W-1:0] crypt_mem [FRAME];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s failed at t=%0t", what, $time);
    end
  endtask

  initial begin
    pn_ref m;
    automatic int    last_out = -1;
    m = new(16);
    for (int i = 0; i < FRAME; i++) begin
      plain_mem[i] = W'($urandom);
      if (i == 0) m.reseed();
      crypt_mem[i] = plain_mem[i] ^ W'(m.word(W));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < FRAME + LAT_P + 2; k++) begin
      @(negedge clk);
      // Outputs now show the words driven LAT_C and LAT_P clocks ago.
      if (k - LAT_C >= 0 && k - LAT_C < FRAME) begin
        check("crypto", crypto_valid && crypto_out == crypt_mem[k - LAT_C] &&
                        crypto_sync == (k - LAT_C == 0));
      end else begin
        check("crypto idle", !crypto_valid);
      end
      if (k - LAT_P >= 0 && k - LAT_P < FRAME) begin
        check("plain", plain_out_valid && plain_out == plain_mem[k - LAT_P] &&
                       plain_out_sync == (k - LAT_P == 0));
        if (plain_out_valid) last_out = k;
      end else begin
        check("plain idle", !plain_out_valid);
      end
      plain_valid = (k < FRAME);
      frame_start = (k == 0);
      plain_in    = (k < FRAME) ? plain_mem[k] : '0;
    end
    check("frame time", last_out == FRAME - 1 + LAT_P);
    $display("frame of %0d words done, last word out at clock %0d", FRAME, last_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
