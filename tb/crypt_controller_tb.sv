// Self-checking testbench of crypt_controller.
// The memories and the two LFSR pairs around the controller are modelled
// here: a ROM filled with random pixels (some with zero nibbles), two RAMs
// with registered reads, and two 8-bit LFSR pairs written as plain shift
// registers (load: din enters bit 3; run: bit 3 takes bit 1 xor bit 0).
// The testbench checks
//  - the serial bits sent during each load are the pixel's bits, LSB first,
//    for exactly four cycles;
//  - every encrypted write goes to the next address and equals the pixel
//    mapped through the nibble cipher table below;
//  - every decrypted write equals the original pixel;
//  - 14 cycles per encrypted pixel, 15 per decrypted pixel, done after
//    64 * 29 = 1856 cycles and held;
//  - the read-out addresses follow host_rdaddr once done;
//  - a second start runs the whole sequence again.
module crypt_controller_tb;
  import lfsr_crypt_pkg::*;

  localparam int N = 64;
  localparam logic [3:0] ENC_MAP [16] = '{4'd0, 4'd11, 4'd13, 4'd6, 4'd10, 4'd1, 4'd7, 4'd12,
                                          4'd5, 4'd14, 4'd8, 4'd3, 4'd15, 4'd4, 4'd2, 4'd9};

  logic clk = 0, rst, start, done;
  ctrl_state_t state;
  phase_t phase;
  logic [3:0] cnt;
  logic [5:0] host_rdaddr, addrs, wradrs1, rdadrs1, wradrs2, rdadrs2;
  logic [7:0] q, enc_dout, data_in1, data_out1, dec_dout, data_in2;
  logic enc_ctrl, dec_ctrl, wren1, wren2;
  logic [1:0] enc_din, dec_din;

  logic [7:0] rom [N];
  logic [7:0] ram1 [N];
  logic [7:0] ram2 [N];
  logic [3:0] e_lo, e_hi, d_lo, d_hi;

  int checks = 0, failures = 0;

  crypt_controller dut (.*);

  always #5 clk = ~clk;

  // models of the surroundings
  always_ff @(posedge clk) begin
    q         <= rom[addrs];
    data_out1 <= ram1[rdadrs1];
    if (wren1) ram1[wradrs1] <= data_in1;
    if (wren2) ram2[wradrs2] <= data_in2;
    e_lo <= enc_ctrl ? {enc_din[0], e_lo[3:1]} : {e_lo[1] ^ e_lo[0], e_lo[3:1]};
    e_hi <= enc_ctrl ? {enc_din[1], e_hi[3:1]} : {e_hi[1] ^ e_hi[0], e_hi[3:1]};
    d_lo <= dec_ctrl ? {dec_din[0], d_lo[3:1]} : {d_lo[1] ^ d_lo[0], d_lo[3:1]};
    d_hi <= dec_ctrl ? {dec_din[1], d_hi[3:1]} : {d_hi[1] ^ d_hi[0], d_hi[3:1]};
  end
  assign enc_dout = {e_hi, e_lo};
  assign dec_dout = {d_hi, d_lo};

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [7:0] cipher(input logic [7:0] v);
    return {ENC_MAP[v[7:4]], ENC_MAP[v[3:0]]};
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one run from start to done, with all per-cycle checks
  task automatic run_once();
    int cyc, last_wr, n_enc, n_dec, load_cnt;
    logic [7:0] cur;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 1; last_wr = 0; n_enc = 0; n_dec = 0; load_cnt = 0;
    while (!done && cyc < 3000) begin
      // serial load bits, sampled before the edge
      if (enc_ctrl || dec_ctrl) begin
        cur = enc_ctrl ? rom[n_enc] : ram1[n_dec];
        check((enc_ctrl ? enc_din : dec_din) == {cur[4 + load_cnt], cur[load_cnt]},
              $sformatf("load bit %0d", load_cnt));
        check(!(enc_ctrl && dec_ctrl), "one pair loads at a time");
        load_cnt++;
      end
      if (wren1) begin
        check(load_cnt == 4, "four load cycles per encrypted pixel");
        check(wradrs1 == 6'(n_enc), "encrypted write address");
        check(data_in1 == cipher(rom[n_enc]), $sformatf("encrypted pixel %0d", n_enc));
        check(cyc - last_wr == 14, "14 cycles per encrypted pixel");
        last_wr = cyc; n_enc++; load_cnt = 0;
      end
      if (wren2) begin
        check(load_cnt == 4, "four load cycles per decrypted pixel");
        check(wradrs2 == 6'(n_dec), "decrypted write address");
        check(data_in2 == rom[n_dec], $sformatf("decrypted pixel %0d", n_dec));
        check(cyc - last_wr == 15, "15 cycles per decrypted pixel");
        last_wr = cyc; n_dec++; load_cnt = 0;
      end
      @(posedge clk);
      #1 cyc++;
    end
    check(n_enc == N && n_dec == N, "all pixels written in both passes");
    check(cyc - 1 == N * 14 + N * 15, $sformatf("done after %0d cycles", cyc - 1));
    repeat (5) begin
      @(posedge clk);
      #1 check(done, "done held");
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; host_rdaddr = '0;
    for (int i = 0; i < N; i++) begin
      rom[i] = 8'($urandom);
      if (i % 8 == 0) rom[i][3:0] = 4'd0;       // zero nibbles stay zero
      if (i % 8 == 1) rom[i][7:4] = 4'd0;
      ram1[i] = '0; ram2[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1 check(!done && state == S_IDLE, "idle after reset");

    run_once();
    for (int i = 0; i < N; i++) begin
      host_rdaddr = 6'(i);
      #1 check(rdadrs1 == 6'(i) && rdadrs2 == 6'(i), "read-out addresses follow host");
    end

    // second run with a new image
    for (int i = 0; i < N; i++) rom[i] = 8'($urandom);
    run_once();
    for (int i = 0; i < N; i++) begin
      check(ram1[i] == cipher(rom[i]), "encrypted RAM contents");
      check(ram2[i] == rom[i], "decrypted RAM contents");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
