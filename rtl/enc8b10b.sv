// 8b/10b encoder with running disparity.
//
// Encodes one byte per accepted cycle into a 10-bit code word using the
// standard 5b/6b and 3b/4b sub-block tables (tables in comm_pkg). The running
// disparity starts negative after reset and is updated after every word.
// The document states that the LVDS links use 8b/10b coding; the code itself
// is the standard one, and the registered output is this design's choice.
//
// Interface: in_valid/in_k/in_d in, code out one clock later with
// code_valid. Bit 9 of code is "a", the first bit on the line; bit 0 is "j".
// A K request for a byte that is no valid control code encodes the data code
// and raises k_err for that word.
module enc8b10b
  import comm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_k,
  input  logic [7:0] in_d,
  output logic       code_valid,
  output logic [9:0] code,
  output logic       k_err,
  output logic       rd_pos       // running disparity is +1
);

  logic [4:0] x;
  logic [2:0] y;
  logic       kk;
  logic [5:0] c6n, c6;
  logic [3:0] c4n, c4;
  logic       bal6, bal4, flip6, flip4, rd_mid, rd_next, use_a7;

  always_comb begin
    x      = in_d[4:0];
    y      = in_d[7:5];
    kk     = in_k && k_valid(in_d);
    c6n    = (kk && x == 5'd28) ? C6_K28 : c6_neg(x);
    bal6   = (ones6(c6n) == 3'd3);
    flip6  = !bal6 || (x == 5'd7);
    c6     = (rd_pos && flip6) ? ~c6n : c6n;
    rd_mid = bal6 ? rd_pos : !rd_pos;
    use_a7 = (y == 3'd7) &&
             ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    if (kk) begin
      c4n   = c4k_neg(y);
      flip4 = 1'b1;
    end else begin
      c4n   = use_a7 ? C4_A7 : c4d_neg(y);
      flip4 = (ones4(c4n) != 3'd2) || (y == 3'd3);
    end
    bal4    = (ones4(c4n) == 3'd2);
    c4      = (rd_mid && flip4) ? ~c4n : c4n;
    rd_next = bal4 ? rd_mid : !rd_mid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pos     <= 1'b0;
      code_valid <= 1'b0;
      code       <= COMMA_NEG;
      k_err      <= 1'b0;
    end else begin
      code_valid <= in_valid;
      if (in_valid) begin
        code   <= {c6, c4};
        rd_pos <= rd_next;
        k_err  <= in_k && !k_valid(in_d);
      end
    end
  end

endmodule
