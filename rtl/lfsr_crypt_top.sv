// Reversible-LFSR image cipher: encrypt an image held in ROM, store it,
// decrypt it again and store the result.
//
// Data path: input image ROM -> encryption LFSR pair -> encrypted-image RAM
// -> decryption LFSR pair -> decrypted-image RAM, sequenced by
// crypt_controller. Each 8-bit pixel is split into two nibbles; each nibble
// is shifted serially into a 4-bit maximal-length LFSR (period 15). The
// encryption pair runs 7 steps after loading, the decryption pair 8 more, so
// the decrypted image equals the input image. A nibble of zero stays zero.
//
// Interface: pulse start (one cycle) after rst; done rises after
// NUM_PIXELS * (7 + ENC_SHIFTS) + NUM_PIXELS * (7 + DEC_SHIFTS) cycles
// (1856 at the defaults) and stays high. The ROM address, memory buses, LFSR
// load controls and controller state are brought out for observation, under
// the names the published simulation uses (addrs, q, Data_in1, wradrs1, ...).
// While idle or done, host_rdaddr selects the word of both RAMs shown on
// Data_out1 (encrypted) and Data_out2 (decrypted) one cycle later.
//
// The block structure, memory sizes and step counts follow the published
// design; the handshake (start/done) and the read-out port are this
// implementation's own.
module lfsr_crypt_top
  import lfsr_crypt_pkg::*;
#(
  parameter int unsigned NUM_PIXELS = lfsr_crypt_pkg::DEF_NUM_PIXELS,
  localparam int unsigned AW = $clog2(NUM_PIXELS)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [AW-1:0]      host_rdaddr,
  output logic               done,
  output ctrl_state_t        state,
  output phase_t             phase,
  output logic [3:0]         cnt,
  output logic [AW-1:0]      addrs,      // input ROM address
  output logic [PIXEL_W-1:0] q,          // input ROM data
  output logic               enc_ctrl,   // load control of the encryption pair
  output logic [1:0]         enc_din,    // serial bits {high nibble, low nibble}
  output logic               dec_ctrl,
  output logic [1:0]         dec_din,
  output logic [PIXEL_W-1:0] Data_in1,   // encrypted pixel being written
  output logic [AW-1:0]      wradrs1,
  output logic               wren1,
  output logic [AW-1:0]      rdadrs1,
  output logic [PIXEL_W-1:0] Data_out1,  // encrypted-image RAM read data
  output logic [PIXEL_W-1:0] Data_in2,   // decrypted pixel being written
  output logic [AW-1:0]      wradrs2,
  output logic               wren2,
  output logic [AW-1:0]      rdadrs2,
  output logic [PIXEL_W-1:0] Data_out2   // decrypted-image RAM read data
);

  logic [PIXEL_W-1:0] enc_dout, dec_dout;

  crypt_controller #(.NUM_PIXELS(NUM_PIXELS)) u_ctrl (
    .clk, .rst, .start, .done, .state, .phase, .cnt, .host_rdaddr,
    .addrs, .q,
    .enc_ctrl, .enc_din, .enc_dout,
    .wren1, .wradrs1, .data_in1(Data_in1), .rdadrs1, .data_out1(Data_out1),
    .dec_ctrl, .dec_din, .dec_dout,
    .wren2, .wradrs2, .data_in2(Data_in2), .rdadrs2
  );

  image_rom #(.DEPTH(NUM_PIXELS), .WIDTH(PIXEL_W)) u_rom (
    .clk, .addr(addrs), .rdata(q)
  );

  rev_lfsr8 u_enc (.clk, .din(enc_din), .ctrl(enc_ctrl), .dout(enc_dout));

  image_ram #(.DEPTH(NUM_PIXELS), .WIDTH(PIXEL_W)) u_ram_enc (
    .clk, .wren(wren1), .wraddr(wradrs1), .wdata(Data_in1),
    .rdaddr(rdadrs1), .rdata(Data_out1)
  );

  rev_lfsr8 u_dec (.clk, .din(dec_din), .ctrl(dec_ctrl), .dout(dec_dout));

  image_ram #(.DEPTH(NUM_PIXELS), .WIDTH(PIXEL_W)) u_ram_dec (
    .clk, .wren(wren2), .wraddr(wradrs2), .wdata(Data_in2),
    .rdaddr(rdadrs2), .rdata(Data_out2)
  );

endmodule
