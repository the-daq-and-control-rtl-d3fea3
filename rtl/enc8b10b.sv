// enc8b10b: 8b/10b encoder with running disparity.
//
// Encodes one byte (or a K control character when k is high) per enabled
// clock into a 10-bit code word q = {a,b,c,d,e,i,f,g,h,j}, q[9] being sent
// first. The 5b/6b and 3b/4b sub-blocks are looked up in the standard
// tables by their negative-disparity form and complemented when the running
// disparity is positive and the sub-block is unbalanced (or is one of the
// alternating balanced forms D.07 and x.3, and all K.28 3b/4b forms). The
// alternate D.x.A7 form avoids runs of five equal bits. Only K.28.y control
// characters are supported. Registered output: q is valid one clock after en.
// The Pixel FEC sends its channel stream 8b/10b encoded; the code itself
// is the standard one.
module enc8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       k,
  input  logic [7:0] d,
  output logic [9:0] q,
  output logic       rd_pos
);
  logic [5:0] t6, c6;
  logic [3:0] t4, c4;
  logic       rd6, alt6, alt4;
  logic [4:0] x;
  logic [2:0] y;

  assign x = d[4:0];
  assign y = d[7:5];

  always_comb begin
    case (x)
      5'd0:  t6 = 6'b100111; 5'd1:  t6 = 6'b011101; 5'd2:  t6 = 6'b101101; 5'd3:  t6 = 6'b110001;
      5'd4:  t6 = 6'b110101; 5'd5:  t6 = 6'b101001; 5'd6:  t6 = 6'b011001; 5'd7:  t6 = 6'b111000;
      5'd8:  t6 = 6'b111001; 5'd9:  t6 = 6'b100101; 5'd10: t6 = 6'b010101; 5'd11: t6 = 6'b110100;
      5'd12: t6 = 6'b001101; 5'd13: t6 = 6'b101100; 5'd14: t6 = 6'b011100; 5'd15: t6 = 6'b010111;
      5'd16: t6 = 6'b011011; 5'd17: t6 = 6'b100011; 5'd18: t6 = 6'b010011; 5'd19: t6 = 6'b110010;
      5'd20: t6 = 6'b001011; 5'd21: t6 = 6'b101010; 5'd22: t6 = 6'b011010; 5'd23: t6 = 6'b111010;
      5'd24: t6 = 6'b110011; 5'd25: t6 = 6'b100110; 5'd26: t6 = 6'b010110; 5'd27: t6 = 6'b110110;
      5'd28: t6 = 6'b001110; 5'd29: t6 = 6'b101110; 5'd30: t6 = 6'b011110; default: t6 = 6'b101011;
    endcase
    if (k) t6 = 6'b001111;                       // K.28
    alt6 = ($countones(t6) != 3) || (!k && x == 5'd7);
    c6   = (rd_pos && alt6) ? ~t6 : t6;
    rd6  = ($countones(t6) != 3) ? ~rd_pos : rd_pos;

    if (k) begin
      case (y)
        3'd0: t4 = 4'b1011; 3'd1: t4 = 4'b0110; 3'd2: t4 = 4'b1010; 3'd3: t4 = 4'b1100;
        3'd4: t4 = 4'b1101; 3'd5: t4 = 4'b0101; 3'd6: t4 = 4'b1001; default: t4 = 4'b0111;
      endcase
      alt4 = 1'b1;
    end else begin
      case (y)
        3'd0: t4 = 4'b1011; 3'd1: t4 = 4'b1001; 3'd2: t4 = 4'b0101; 3'd3: t4 = 4'b1100;
        3'd4: t4 = 4'b1101; 3'd5: t4 = 4'b1010; 3'd6: t4 = 4'b0110;
        default: t4 = ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                       ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14))) ? 4'b0111 : 4'b1110;
      endcase
      alt4 = ($countones(t4) != 2) || (y == 3'd3);
    end
    c4 = (rd6 && alt4) ? ~t4 : t4;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= 10'b0011111010;   // K.28.5, negative disparity
      rd_pos <= 1'b0;
    end else if (en) begin
      q <= {c6, c4};
      rd_pos <= ($countones(t4) != 2) ? ~rd6 : rd6;
    end
  end
endmodule
