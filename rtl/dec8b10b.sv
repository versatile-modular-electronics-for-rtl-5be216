// 8b/10b decoder with code and running-disparity checking.
//
// Looks up the 6-bit and 4-bit sub-blocks of a received code word against the
// standard tables (comm_pkg) in both disparity forms, returns the byte and
// whether it is a control (K) code. code_err flags a word that is in neither
// table; disp_err flags a sub-block whose disparity does not fit the running
// disparity, which is then re-synchronised to the received word. The document
// only names the 8b/10b coding; table lookup by search and the one-cycle
// registered output are this design's choices.
//
// Interface: code_valid/code in (bit 9 = a, first on the line), out_valid
// with out_k, out_d, code_err, disp_err one clock later.
module dec8b10b
  import comm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       code_valid,
  input  logic [9:0] code,
  output logic       out_valid,
  output logic       out_k,
  output logic [7:0] out_d,
  output logic       code_err,
  output logic       disp_err
);

  logic       rd_pos;
  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic       f6, f4, is_k28, is_k7, rd_mid, rd_next, derr;
  logic [2:0] n6, n4;

  always_comb begin
    c6 = code[9:4];
    c4 = code[3:0];
    x  = '0;
    y  = '0;
    f6 = 1'b0;
    f4 = 1'b0;
    is_k7 = 1'b0;
    is_k28 = (c6 == C6_K28) || (c6 == ~C6_K28);
    if (is_k28) begin
      x  = 5'd28;
      f6 = 1'b1;
    end else begin
      for (int i = 0; i < 32; i++) begin
        if (c6 == c6_neg(5'(i)) ||
            ((ones6(c6_neg(5'(i))) != 3'd3 || i == 7) && c6 == ~c6_neg(5'(i)))) begin
          x  = 5'(i);
          f6 = 1'b1;
        end
      end
    end
    if (is_k28) begin
      // After 001111 the disparity is +, so the 4b code is the RD+ form.
      for (int j = 0; j < 8; j++) begin
        if ((c6 == C6_K28 && c4 == ~c4k_neg(3'(j))) ||
            (c6 != C6_K28 && c4 == c4k_neg(3'(j)))) begin
          y  = 3'(j);
          f4 = 1'b1;
        end
      end
    end else begin
      for (int j = 0; j < 7; j++) begin
        if (c4 == c4d_neg(3'(j)) ||
            ((ones4(c4d_neg(3'(j))) != 3'd2 || j == 3) && c4 == ~c4d_neg(3'(j)))) begin
          y  = 3'(j);
          f4 = 1'b1;
        end
      end
      if (c4 == 4'b1110 || c4 == 4'b0001) begin
        y  = 3'd7;
        f4 = 1'b1;
      end
      if (c4 == C4_A7 || c4 == ~C4_A7) begin
        y  = 3'd7;
        f4 = 1'b1;
        is_k7 = (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);
      end
    end
    // Disparity tracking on the received sub-blocks.
    n6   = ones6(c6);
    n4   = ones4(c4);
    derr = 1'b0;
    if (n6 == 3'd4)      begin derr = rd_pos;  rd_mid = 1'b1; end
    else if (n6 == 3'd2) begin derr = !rd_pos; rd_mid = 1'b0; end
    else                 begin derr = (n6 != 3'd3); rd_mid = rd_pos; end
    if (n4 == 3'd3)      begin derr = derr || rd_mid;  rd_next = 1'b1; end
    else if (n4 == 3'd1) begin derr = derr || !rd_mid; rd_next = 1'b0; end
    else                 begin derr = derr || (n4 != 3'd2); rd_next = rd_mid; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pos    <= 1'b0;
      out_valid <= 1'b0;
      out_k     <= 1'b0;
      out_d     <= '0;
      code_err  <= 1'b0;
      disp_err  <= 1'b0;
    end else begin
      out_valid <= code_valid;
      if (code_valid) begin
        out_d    <= {y, x};
        out_k    <= is_k28 || is_k7;
        code_err <= !(f6 && f4);
        disp_err <= derr;
        rd_pos   <= rd_next;
      end
    end
  end

endmodule
