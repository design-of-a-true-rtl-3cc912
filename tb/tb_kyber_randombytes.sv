// Workload testbench: the random bytes one CRYSTALS-Kyber operation asks for,
// served by the accelerator at its default parameters (32 rings of 13 inverters,
// 32-bit key) with a 1.4 ns clock.
//
// The testbench plays a byte-buffer driver on the two bus ports: clear the
// acknowledge bit, pulse the enable bit, then for every 4 bytes clear the
// acknowledge bit, poll the key-ready bit, read the key word and split it into
// bytes (least significant first), and write the acknowledge bit.
//
// Requests (Kyber sizes: 64 bytes for key generation, the seed and the rejection
// secret; 32 bytes for encapsulation):
//   1. key generation, 64 bytes, raw keys;
//   2. encapsulation, 32 bytes, raw keys;
//   3. encapsulation, 32 bytes, with the conditioning bit set.
// Checks: every word equals the 32 raw bits the noise source produced for it
// (observed inside the design), or for request 3 the low 32 bits of
// Keccak-f[1600] of that raw word; no word repeats; each word is delivered in at
// most 150 cycles after the previous one (the first one included). The cycle count
// of each request is printed.
`timescale 1ns / 1ps
module tb_kyber_randombytes;
  import trng_pkg::*;
  import keccak_ref_pkg::*;
  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  reg_req_t  creq = '0;
  reg_rsp_t  crsp;
  obi_req_t  oreq = '0;
  obi_rsp_t  orsp;
  logic      trng_intr, keccak_intr, flush;
  cu_state_e state;
  int        checks = 0, failures = 0;

  trng_keccak_wrapper dut (
    .clk_i(clk), .rst_ni(rst_n),
    .ctrl_reg_req_i(creq), .ctrl_reg_rsp_o(crsp),
    .data_obi_req_i(oreq), .data_obi_rsp_o(orsp),
    .trng_intr_o(trng_intr), .keccak_intr_o(keccak_intr),
    .flush_regs_o(flush), .trng_state_o(state));

  always #0.7 clk = ~clk;

  initial begin : watchdog
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // raw key as the noise source delivers it, latched when the key is complete
  logic [31:0] raw_shift = '0;
  logic [31:0] raw_key   = '0;
  int          cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (dut.u_trng_keccak.u_trng.dff_en_s)
      raw_shift <= {raw_shift[30:0], dut.u_trng_keccak.u_trng.rnd_bit_s};
    if (state == CU_ES32) raw_key <= raw_shift;
  end

  task automatic ctrl_wr(input logic [31:0] data);
    @(negedge clk);
    creq = '{valid: 1'b1, write: 1'b1, addr: 32'h0, wdata: data, wstrb: 4'hF};
    @(negedge clk);
    creq = '0;
  endtask

  task automatic ctrl_rd(output logic [31:0] data);
    @(negedge clk);
    creq = '{valid: 1'b1, write: 1'b0, addr: 32'h0, wdata: '0, wstrb: '0};
    #0.1;
    data = crsp.rdata;
    @(negedge clk);
    creq = '0;
  endtask

  task automatic obi_rd(input logic [31:0] addr, output logic [31:0] rdata);
    @(negedge clk);
    oreq = '{req: 1'b1, we: 1'b0, be: 4'hF, addr: addr, wdata: '0};
    #0.1;
    while (!orsp.gnt) begin
      @(negedge clk);
      #0.1;
    end
    @(negedge clk);
    oreq = '0;
    check(orsp.rvalid && !orsp.err, "key word read failed");
    rdata = orsp.rdata;
  endtask

  logic [31:0] seen [$];

  // byte-buffer driver; cond selects conditioned keys
  task automatic get_rnd_bytes(input int nbytes, input logic cond, input string name);
    logic [7:0]  buf_q [$];
    logic [31:0] d, key, expect_key;
    logic [1599:0] perm;
    int          t_start, t_word, n;
    logic [31:0] c = cond ? (32'h1 << CTRL_CONDITIONING_BIT) : 32'h0;
    t_start = cycle;
    ctrl_wr(c);
    ctrl_wr(c | (32'h1 << CTRL_TRNG_EN_BIT));
    ctrl_wr(c);
    for (int i = 0; i < nbytes; i += 4) begin
      t_word = cycle;
      ctrl_wr(c);
      n = 0;
      do begin
        ctrl_rd(d);
        n++;
      end while (!d[STATUS_TRNG_BIT] && n < 400);
      check(d[STATUS_TRNG_BIT], $sformatf("%s: key %0d never ready", name, i / 4));
      obi_rd(32'(DOUT_KEY_OFFSET), key);
      for (int j = 0; j < 4; j++) buf_q.push_back(key[8*j +: 8]);
      if (cond) begin
        perm       = permute(1600'(raw_key));
        expect_key = perm[31:0];
      end else begin
        expect_key = raw_key;
      end
      check(key == expect_key, $sformatf("%s: word %0d is %h, expected %h", name, i / 4, key, expect_key));
      foreach (seen[k]) check(seen[k] != key, $sformatf("%s: word %h repeats", name, key));
      seen.push_back(key);
      check(cycle - t_word <= 150, $sformatf("%s: word %0d took %0d cycles", name, i / 4, cycle - t_word));
      ctrl_wr(c | (32'h1 << CTRL_ACK_KEY_READ_BIT));
    end
    check(buf_q.size() == nbytes, $sformatf("%s: %0d bytes delivered", name, buf_q.size()));
    $display("%s: %0d bytes in %0d cycles", name, nbytes, cycle - t_start);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    get_rnd_bytes(64, 1'b0, "Kyber key generation");
    get_rnd_bytes(32, 1'b0, "Kyber encapsulation");
    get_rnd_bytes(32, 1'b1, "Kyber encapsulation, conditioned");
    check(state != CU_DEAD, "accelerator died");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
