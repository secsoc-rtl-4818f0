// tb_smu: drives the security management unit through configuration, block
// hashing and verification, and encryption/decryption. Expected values come
// from the behavioural AES and CBC-MAC of aes_ref_pkg. Checks cycle counts
// of encryption (11) and decryption (21), that a tampered instruction stream
// or an unregistered serial fails verification, that the lock blocks
// configuration writes and that erase clears the store.
module tb_smu;
  import aes_ref_pkg::*;
  import secsoc_pkg::*;

  localparam logic [127:0] MK = 128'h5ec5_0c00_1234_5678_9abc_def0_0fed_cba9;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_lock = 0, cfg_erase = 0, cfg_locked;
  logic [15:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic [SERIAL_W-1:0] ser_query = 0, fin_serial = 0;
  logic ser_registered;
  logic hash_valid = 0, hash_first = 0, hash_ready;
  word_t hash_word = 0;
  logic fin_valid = 0, fin_ready, verify_done, verify_ok;
  logic crypt_valid = 0, crypt_decrypt = 0, crypt_ready, crypt_done;
  blk_t crypt_data = 0, crypt_result;
  int checks = 0, failures = 0;

  smu #(.NUM_BLOCKS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic set_key(input logic [127:0] k);
    for (int w = 0; w < 4; w++) cfg_write(16'(w), k[127 - 32*w -: 32]);
  endtask

  task automatic set_hash(input int e, input logic [127:0] h, input logic v);
    for (int w = 0; w < 4; w++) cfg_write({2'b01, 12'(e), 2'(w)}, h[127 - 32*w -: 32]);
    cfg_write({2'b10, 14'(e)}, {31'd0, v});
  endtask

  task automatic crypt(input logic dec, input blk_t d, output blk_t r, output int cyc);
    @(negedge clk); crypt_valid = 1; crypt_decrypt = dec; crypt_data = d;
    while (!crypt_ready) @(negedge clk);
    @(posedge clk); #1 crypt_valid = 0;
    cyc = 0;
    while (!crypt_done) begin @(posedge clk); #1 cyc++; end
    r = crypt_result;
  endtask

  task automatic send_words(input word_t ws [], input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); hash_valid = 1; hash_first = (i == 0); hash_word = ws[i];
      while (!hash_ready) @(negedge clk);
      @(posedge clk); #1 hash_valid = 0;
    end
  endtask

  task automatic finish_block(input int serial, output logic ok);
    @(negedge clk); fin_valid = 1; fin_serial = 12'(serial);
    while (!fin_ready) @(negedge clk);
    @(posedge clk); #1 fin_valid = 0;
    while (!verify_done) begin @(posedge clk); #1; end
    ok = verify_ok;
  endtask

  initial begin
    logic [127:0] key, pt, r, mac;
    word_t prog [];
    int cyc;
    logic ok;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_erase = 1; @(negedge clk); cfg_erase = 0;
    check(!cfg_locked, "unlocked after erase");
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    set_key(key);
    // a load block: Begin 3, four lw x5, End 3
    prog = new[6];
    prog[0] = {12'd3, 5'd0, 3'b000, 5'd0, 7'b0010011};
    for (int i = 0; i < 4; i++) prog[1+i] = {12'(40 + 4*i), 5'd10, 3'b010, 5'd5, 7'b0000011};
    prog[5] = {12'd3, 5'd1, 3'b000, 5'd0, 7'b0010011};
    mac = block_mac(MK, prog, 6);
    set_hash(3, mac, 1'b1);
    set_hash(5, ~mac, 1'b1);
    for (int e = 0; e < 8; e++) if (e != 3 && e != 5) cfg_write({2'b10, 14'(e)}, 32'd0);
    @(negedge clk); cfg_lock = 1; @(negedge clk); cfg_lock = 0;
    check(cfg_locked, "locked");
    // registration query
    for (int e = 0; e < 10; e++) begin
      ser_query = 12'(e); #1;
      check(ser_registered == (e == 3 || e == 5), $sformatf("ser_registered %0d", e));
    end
    // crypt
    for (int i = 0; i < 6; i++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      crypt(0, pt, r, cyc);
      check(r == aes_ref_pkg::encrypt(key, pt), "encrypt result");
      check(cyc == 11, $sformatf("encrypt latency %0d", cyc));
      crypt(1, r, r, cyc);
      check(r == pt, "decrypt result");
      check(cyc == 21, $sformatf("decrypt latency %0d", cyc));
    end
    // hash verification
    send_words(prog, 6);
    finish_block(3, ok);
    check(ok, "genuine block verifies");
    send_words(prog, 6);
    finish_block(5, ok);
    check(!ok, "wrong stored hash rejected");
    prog[2][31:20] = 12'd99;   // tampered offset
    send_words(prog, 6);
    finish_block(3, ok);
    check(!ok, "tampered block rejected");
    send_words(prog, 6);
    finish_block(6, ok);
    check(!ok, "unregistered serial rejected");
    // locked: key write ignored
    set_key(~key);
    pt = 128'h00112233445566778899aabbccddeeff;
    crypt(0, pt, r, cyc);
    check(r == aes_ref_pkg::encrypt(key, pt), "key write ignored while locked");
    // erase wipes hashes and key, then reprogramming works
    @(negedge clk); cfg_erase = 1; @(negedge clk); cfg_erase = 0;
    ser_query = 12'd3; #1;
    check(!ser_registered, "erase clears valid");
    check(!cfg_locked, "erase unlocks");
    crypt(0, pt, r, cyc);
    check(r == aes_ref_pkg::encrypt('0, pt), "erase clears key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
