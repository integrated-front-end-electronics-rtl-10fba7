// tb_crc32: checks the word-wide CRC-32 step against check values computed
// separately (MSB-first CRC-32, polynomial 0x04C11DB7, init 0xFFFFFFFF, no
// reflection, no final XOR) for fixed word sequences, and against a
// bit-serial LFSR reference for random words.
`include "tb_util.svh"
module tb_crc32;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [31:0] ci, di, co;
  crc32 dut (.crc_i(ci), .data_i(di), .crc_o(co));

  // bit-serial reference (Galois LFSR, one data bit per step)
  function automatic logic [31:0] ref_step(logic [31:0] c, logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c = c << 1;
      if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction

  initial begin
    // "12345678" as two big-endian words: CRC-32/MPEG-2 of those 8 bytes
    ci = 32'hFFFF_FFFF; di = 32'h3132_3334; #1;
    ci = co;            di = 32'h3536_3738; #1;
    `TB_CHECK(co == 32'h49E3_C2FB, $sformatf("known vector got %08x", co))
    // single zero word from all ones
    ci = 32'hFFFF_FFFF; di = 32'h0000_0000; #1;
    `TB_CHECK(co == 32'hC704_DD7B, $sformatf("zero word got %08x", co))
    for (int i = 0; i < 200; i++) begin
      ci = $urandom; di = $urandom; #1;
      `TB_CHECK(co == ref_step(ci, di), "random step")
    end
    `TB_DONE
  end
endmodule
