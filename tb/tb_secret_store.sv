// tb_secret_store: programs the key, hash entries and valid flags through the
// configuration port and reads them back through the internal ports; checks
// that the lock blocks every write, that erase wipes key and valid flags and
// reopens the store, and that the master key is the fabrication constant.
module tb_secret_store;
  localparam int NB = 16;
  localparam logic [127:0] MK = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;

  logic clk = 0;
  logic cfg_we = 0, cfg_lock = 0, cfg_erase = 0, locked;
  logic [15:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic [127:0] master_key, app_key, rd_hash;
  logic [3:0] rd_idx = 0, q_idx = 0;
  logic rd_valid, q_valid;
  int checks = 0, failures = 0;

  secret_store #(.NUM_BLOCKS(NB), .MASTER_KEY(MK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  logic [127:0] h [NB];
  logic         v [NB];

  initial begin
    logic [127:0] k;
    @(negedge clk); cfg_erase = 1; @(negedge clk); cfg_erase = 0;
    check(!locked && app_key == 0, "erased");
    check(master_key == MK, "master key");
    k = {$urandom, $urandom, $urandom, $urandom};
    for (int w = 0; w < 4; w++) wr(16'(w), k[127 - 32*w -: 32]);
    for (int e = 0; e < NB; e++) begin
      h[e] = {$urandom, $urandom, $urandom, $urandom};
      v[e] = $urandom_range(0, 1);
      for (int w = 0; w < 4; w++) wr({2'b01, 12'(e), 2'(w)}, h[e][127 - 32*w -: 32]);
      wr({2'b10, 14'(e)}, {31'd0, v[e]});
    end
    check(app_key == k, "key written");
    for (int e = 0; e < NB; e++) begin
      rd_idx = 4'(e); q_idx = 4'(NB - 1 - e); #1;
      check(rd_hash == h[e] && rd_valid == v[e], $sformatf("entry %0d", e));
      check(q_valid == v[NB - 1 - e], $sformatf("query %0d", NB - 1 - e));
    end
    @(negedge clk); cfg_lock = 1; @(negedge clk); cfg_lock = 0;
    check(locked, "locked");
    wr(16'd0, ~k[127:96]);
    wr({2'b01, 12'd2, 2'd0}, ~h[2][127:96]);
    wr({2'b10, 14'd2}, {31'd0, ~v[2]});
    rd_idx = 2; q_idx = 2; #1;
    check(app_key == k && rd_hash == h[2] && rd_valid == v[2] && q_valid == v[2], "writes ignored when locked");
    @(negedge clk); cfg_erase = 1; @(negedge clk); cfg_erase = 0;
    check(!locked && app_key == 0, "erase unlocks and clears the key");
    for (int e = 0; e < NB; e++) begin
      rd_idx = 4'(e); #1;
      check(!rd_valid, $sformatf("erase clears valid %0d", e));
    end
    wr({2'b10, 14'd5}, 32'd1);
    q_idx = 5; #1;
    check(q_valid, "writable again after erase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
