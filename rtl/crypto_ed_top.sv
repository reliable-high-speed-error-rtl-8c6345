// Top level: the eight fault-detecting Pomaranch S-boxes next to the AES-128
// encryption core.
//
// The two parts are independent and share nothing but the ports of this
// module. The S-box side holds the eight 9-bit-in, 7-bit-out substitution
// boxes that Pomaranch places in its jump register sections 1 to 8 (section 9
// has none). The jump registers themselves, which produce the S-box inputs
// and consume their outputs, are outside this design: their jump-control
// values come in on sbox_x and leave on sbox_y. Each S-box reports its seven
// signatures on sbox_err; alarm is the OR of all of them. sbox_fi carries
// fault-injection masks for reliability experiments and is tied to '0 in use.
// The S-box side is combinational.
//
// The AES side is aes128_encrypt with its ports brought out unchanged:
// start/busy/done handshake, 11 cycles per 128-bit block.
module crypto_ed_top
  import pom_sbox_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned     NUM_SBOX = 8,
  parameter logic [NS-1:0]   SIG_EN   = '1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Pomaranch S-boxes
  input  gf512_t                sbox_x   [NUM_SBOX],
  input  pom_fi_t               sbox_fi  [NUM_SBOX],
  output logic [NO-1:0]         sbox_y   [NUM_SBOX],
  output logic [NS-1:0]         sbox_err [NUM_SBOX],
  output logic                  alarm,
  // AES-128 encryption
  input  logic                  aes_start,
  input  block_t                aes_plaintext,
  input  block_t                aes_key,
  output logic                  aes_busy,
  output logic                  aes_done,
  output block_t                aes_ciphertext
);

  logic [NUM_SBOX-1:0] sbox_alarm;

  for (genvar i = 0; i < NUM_SBOX; i++) begin : g_sbox
    pom_sbox_ed #(.SIG_EN(SIG_EN)) u_sbox (
      .x(sbox_x[i]), .fi(sbox_fi[i]), .y(sbox_y[i]),
      .err(sbox_err[i]), .alarm(sbox_alarm[i]));
  end

  assign alarm = |sbox_alarm;

  aes128_encrypt u_aes (
    .clk(clk), .rst_n(rst_n), .start(aes_start), .plaintext(aes_plaintext),
    .key(aes_key), .busy(aes_busy), .done(aes_done), .ciphertext(aes_ciphertext));

endmodule
