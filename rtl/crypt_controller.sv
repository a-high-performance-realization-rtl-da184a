// Sequencer of the image cipher.
//
// After start the controller makes two passes over the image. In the
// encryption pass it reads pixel n from the input ROM, loads it into the
// encryption LFSR pair, lets the pair run ENC_SHIFTS steps and writes the
// result to word n of the encrypted-image RAM. In the decryption pass it
// reads word n of the encrypted-image RAM, loads it into the decryption LFSR
// pair, lets it run DEC_SHIFTS steps and writes the result to word n of the
// decrypted-image RAM. Then it raises done until the next start.
//
// Per pixel the states are ADDR (address to the memory, 1 cycle), READ
// (registered memory data arrives and is latched, 1 cycle), LOAD (ctrl = 1,
// the nibble bits go out LSB first on din, 4 cycles), SHIFT (ctrl = 0, the
// LFSRs run, ENC_SHIFTS or DEC_SHIFTS cycles) and WRITE (the LFSR outputs are
// written, 1 cycle). An encryption pass therefore takes NUM_PIXELS *
// (7 + ENC_SHIFTS) cycles and a decryption pass NUM_PIXELS * (7 + DEC_SHIFTS).
//
// While no pass is running, rdadrs1 and rdadrs2 follow host_rdaddr so that
// both RAMs can be read out. rst is synchronous and active high.
//
// The serial nibble load with a load control, the two LFSR pairs, the three
// memories and the step counts follow the published design; the state
// sequence, the cycle counts of ADDR/READ/WRITE and the host read-out are
// this implementation's own choices.
module crypt_controller
  import lfsr_crypt_pkg::*;
#(
  parameter int unsigned NUM_PIXELS = lfsr_crypt_pkg::DEF_NUM_PIXELS,
  parameter int unsigned ENC_SHIFTS = lfsr_crypt_pkg::DEF_ENC_SHIFTS,
  parameter int unsigned DEC_SHIFTS = lfsr_crypt_pkg::DEF_DEC_SHIFTS,
  localparam int unsigned AW = $clog2(NUM_PIXELS),
  localparam int unsigned MAXS = (ENC_SHIFTS > DEC_SHIFTS) ? ENC_SHIFTS : DEC_SHIFTS,
  localparam int unsigned CW = $clog2(((MAXS > NIBBLE_W) ? MAXS : NIBBLE_W) + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  output logic               done,
  output ctrl_state_t        state,
  output phase_t             phase,
  output logic [CW-1:0]      cnt,
  input  logic [AW-1:0]      host_rdaddr,
  // input image ROM
  output logic [AW-1:0]      addrs,
  input  logic [PIXEL_W-1:0] q,
  // encryption LFSR pair
  output logic               enc_ctrl,
  output logic [1:0]         enc_din,
  input  logic [PIXEL_W-1:0] enc_dout,
  // encrypted-image RAM
  output logic               wren1,
  output logic [AW-1:0]      wradrs1,
  output logic [PIXEL_W-1:0] data_in1,
  output logic [AW-1:0]      rdadrs1,
  input  logic [PIXEL_W-1:0] data_out1,
  // decryption LFSR pair
  output logic               dec_ctrl,
  output logic [1:0]         dec_din,
  input  logic [PIXEL_W-1:0] dec_dout,
  // decrypted-image RAM
  output logic               wren2,
  output logic [AW-1:0]      wradrs2,
  output logic [PIXEL_W-1:0] data_in2,
  output logic [AW-1:0]      rdadrs2
);

  logic [AW-1:0]      addr;
  logic [PIXEL_W-1:0] pixel;
  logic [CW-1:0]      last_shift;
  logic [1:0]         nib_bits;

  assign last_shift = (phase == PH_ENC) ? CW'(ENC_SHIFTS - 1) : CW'(DEC_SHIFTS - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      phase <= PH_ENC;
      addr  <= '0;
      cnt   <= '0;
      pixel <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            phase <= PH_ENC;
            addr  <= '0;
            state <= S_ADDR;
          end
        end
        S_ADDR: state <= S_READ;
        S_READ: begin
          pixel <= (phase == PH_ENC) ? q : data_out1;
          cnt   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (cnt == CW'(NIBBLE_W - 1)) begin
            cnt   <= '0;
            state <= S_SHIFT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_SHIFT: begin
          if (cnt == last_shift) begin
            cnt   <= '0;
            state <= S_WRITE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WRITE: begin
          if (addr == AW'(NUM_PIXELS - 1)) begin
            addr <= '0;
            if (phase == PH_ENC) begin
              phase <= PH_DEC;
              state <= S_ADDR;
            end else begin
              state <= S_DONE;
            end
          end else begin
            addr  <= addr + 1'b1;
            state <= S_ADDR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Bit cnt of each nibble during LOAD: {high nibble bit, low nibble bit}.
  logic [NIBBLE_W-1:0] nib_lo, nib_hi;
  assign nib_lo   = pixel[NIBBLE_W-1:0];
  assign nib_hi   = pixel[PIXEL_W-1:NIBBLE_W];
  assign nib_bits = {nib_hi[cnt[1:0]], nib_lo[cnt[1:0]]};

  always_comb begin
    logic running;
    running = (state != S_IDLE) && (state != S_DONE);
    done    = (state == S_DONE);

    addrs   = addr;
    enc_ctrl   = (state == S_LOAD) && (phase == PH_ENC);
    dec_ctrl   = (state == S_LOAD) && (phase == PH_DEC);
    enc_din    = enc_ctrl ? nib_bits : 2'b00;
    dec_din    = dec_ctrl ? nib_bits : 2'b00;

    wren1    = (state == S_WRITE) && (phase == PH_ENC);
    wradrs1  = addr;
    data_in1 = enc_dout;
    wren2    = (state == S_WRITE) && (phase == PH_DEC);
    wradrs2  = addr;
    data_in2 = dec_dout;

    rdadrs1 = (running && phase == PH_DEC) ? addr : host_rdaddr;
    rdadrs2 = host_rdaddr;
  end

  // Only one memory is written at a time, and only in WRITE.
  a_one_writer: assert property (@(posedge clk) disable iff (rst) !(wren1 && wren2));
  // The LFSR load control is raised only while nibble bits are sent.
  a_load_in_load: assert property (@(posedge clk) disable iff (rst)
                                   (enc_ctrl || dec_ctrl) |-> (state == S_LOAD));

endmodule
