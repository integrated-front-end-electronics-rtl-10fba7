// enc8b10b: 8b/10b encoder with running disparity.
//
// Standard 8b/10b code (5b/6b and 3b/4b sub-blocks). q is the 10-bit
// symbol for byte d (or control character K28.y when k is high), bits
// ordered {a,b,c,d,e,i,f,g,h,j}, a sent first. The encoding uses the current
// running disparity; the disparity register is updated when en is high
// (once per symbol sent) and starts negative after reset. Only K28.y control
// characters are supported, which covers the commas the serialiser uses.
// The design description only names the 8b/10b protocol.
module enc8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       k,
  input  logic [7:0] d,
  output logic [9:0] q
);

  logic rd;        // running disparity, 1 = positive
  logic rd6, rd_n;

  // 5b/6b codes for negative running disparity, abcdei
  function automatic logic [5:0] code6(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b codes for negative running disparity, fghj
  function automatic logic [3:0] code4(input logic [2:0] y, input logic kc,
                                       input logic alt);
    if (kc) begin
      case (y)
        3'd0: return 4'b1011;  3'd1: return 4'b0110;
        3'd2: return 4'b1010;  3'd3: return 4'b1100;
        3'd4: return 4'b1101;  3'd5: return 4'b0101;
        3'd6: return 4'b1001;  default: return 4'b0111;
      endcase
    end
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return alt ? 4'b0111 : 4'b1110;
    endcase
  endfunction

  always_comb begin
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       unbal6, unbal4, alt;
    x  = d[4:0];
    y  = d[7:5];
    c6 = k ? 6'b001111 : code6(x);
    unbal6 = ($countones(c6) != 3);
    if (rd && (unbal6 || (!k && x == 5'd7))) c6 = ~c6;
    rd6 = rd ^ unbal6;
    alt = (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
          ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    c4 = code4(y, k, alt);
    unbal4 = ($countones(c4) != 2);
    if (rd6 && (k || unbal4 || y == 3'd3)) c4 = ~c4;
    rd_n = rd6 ^ unbal4;
    q = {c6, c4};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd <= 1'b0;
    else if (en) rd <= rd_n;
  end

endmodule
