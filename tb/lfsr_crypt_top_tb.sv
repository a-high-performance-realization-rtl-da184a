// End-to-end testbench of lfsr_crypt_top at its default size (64 pixels).
// Resets the design, pulses start and waits for done. On the way it checks
// every write into the two RAMs and counts how often each mechanism of the
// design occurs: serial load cycles and free-running cycles of each LFSR
// pair, encrypted and decrypted writes, the switch from the encryption to
// the decryption pass, and pixels with a zero nibble (which the LFSR leaves
// at zero). A mechanism that never occurs counts as a failure.
// After done it reads both RAMs through host_rdaddr: the encrypted image
// must equal the table below (the reference encryption of pixels 1..64,
// printed as signed bytes) and the decrypted image must equal the input
// image 1..64. done must come exactly 64 * 14 + 64 * 15 = 1856 cycles after
// start.
module lfsr_crypt_top_tb;
  import lfsr_crypt_pkg::*;

  localparam int N = 64;
  // reference encrypted image for input pixels 1..64, signed bytes
  localparam byte ENC_IMAGE [N] = '{
      11,  13,   6,  10,   1,   7,  12,   5,
      14,   8,   3,  15,   4,   2,   9, -80,
     -69, -67, -74, -70, -79, -73, -68, -75,
     -66, -72, -77, -65, -76, -78, -71, -48,
     -37, -35, -42, -38, -47, -41, -36, -43,
     -34, -40, -45, -33, -44, -46, -39,  96,
     107, 109, 102, 106,  97, 103, 108, 101,
     110, 104,  99, 111, 100,  98, 105, -96};

  logic clk = 0, rst, start, done;
  logic [5:0] host_rdaddr;
  ctrl_state_t state;
  phase_t phase;
  logic [3:0] cnt;
  logic [5:0] addrs, wradrs1, rdadrs1, wradrs2, rdadrs2;
  logic [7:0] q, Data_in1, Data_out1, Data_in2, Data_out2;
  logic enc_ctrl, dec_ctrl, wren1, wren2;
  logic [1:0] enc_din, dec_din;

  int checks = 0, failures = 0;
  int n_enc_load, n_dec_load, n_enc_run, n_dec_run, n_wr1, n_wr2, n_phase_sw, n_zero_nib;

  lfsr_crypt_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("  %-34s %0d", what, n);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    phase_t last_phase;
    n_enc_load = 0; n_dec_load = 0; n_enc_run = 0; n_dec_run = 0;
    n_wr1 = 0; n_wr2 = 0; n_phase_sw = 0; n_zero_nib = 0;
    rst = 1'b1; start = 1'b0; host_rdaddr = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 1;
    last_phase = phase;
    while (!done && cyc < 4000) begin
      if (enc_ctrl) n_enc_load++;
      if (dec_ctrl) n_dec_load++;
      if (state == S_SHIFT && phase == PH_ENC) n_enc_run++;
      if (state == S_SHIFT && phase == PH_DEC) n_dec_run++;
      if (wren1) begin
        check(Data_in1 == 8'(ENC_IMAGE[wradrs1]), $sformatf("encrypted pixel %0d", wradrs1));
        if (Data_in1[3:0] == 4'd0 || Data_in1[7:4] == 4'd0) n_zero_nib++;
        n_wr1++;
      end
      if (wren2) begin
        check(Data_in2 == 8'(wradrs2) + 8'd1, $sformatf("decrypted pixel %0d", wradrs2));
        n_wr2++;
      end
      if (phase != last_phase) n_phase_sw++;
      last_phase = phase;
      @(posedge clk);
      #1 cyc++;
    end
    check(done, "done reached");
    check(cyc - 1 == N * 14 + N * 15, $sformatf("done after %0d cycles", cyc - 1));

    // read both images back
    for (int i = 0; i < N; i++) begin
      host_rdaddr = 6'(i);
      @(posedge clk);
      #1;
      check(Data_out1 == 8'(ENC_IMAGE[i]), $sformatf("encrypted RAM word %0d = %0d", i, Data_out1));
      check(Data_out2 == 8'(i + 1), $sformatf("decrypted RAM word %0d = %0d", i, Data_out2));
    end

    $display("mechanisms:");
    seen(n_enc_load, "encryption serial-load cycles");
    seen(n_enc_run, "encryption LFSR run cycles");
    seen(n_dec_load, "decryption serial-load cycles");
    seen(n_dec_run, "decryption LFSR run cycles");
    seen(n_wr1, "encrypted-RAM writes");
    seen(n_wr2, "decrypted-RAM writes");
    seen(n_phase_sw, "encrypt-to-decrypt pass switches");
    seen(n_zero_nib, "pixels with a zero nibble");
    check(n_enc_load == 4 * N && n_dec_load == 4 * N, "four load cycles per pixel");
    check(n_enc_run == 7 * N && n_dec_run == 8 * N, "7 / 8 run cycles per pixel");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
