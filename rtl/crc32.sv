// crc32: one-word-per-cycle CRC-32 step.
//
// crc_o is the CRC register after feeding the 32-bit word data_i, most
// significant bit first, into a CRC register holding crc_i. Generator
// polynomial 0x04C11DB7 (IEEE 802.3), not reflected. The EoC framer starts
// from 0xFFFFFFFF and sends the register without final inversion. The design
// description only states a 32-bit CRC; polynomial and bit order are this
// implementation's choices. Purely combinational.
module crc32 (
  input  logic [31:0] crc_i,
  input  logic [31:0] data_i,
  output logic [31:0] crc_o
);

  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  always_comb begin
    logic [31:0] c;
    c = crc_i;
    for (int i = 31; i >= 0; i--) begin
      if (c[31] ^ data_i[i]) c = {c[30:0], 1'b0} ^ POLY;
      else                   c = {c[30:0], 1'b0};
    end
    crc_o = c;
  end

endmodule
