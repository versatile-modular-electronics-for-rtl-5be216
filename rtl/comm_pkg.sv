// Shared types and constants of the high-speed module network.
//
// The network carries bytes as 8b/10b symbols over point-to-point LVDS lines.
// A frame is SOF, a sequence of sub-frames, EOF; each sub-frame is
//   SOSF, ID, TYPE, payload (length set by TYPE), CHK, FLAG, EOSF
// i.e. six bytes of overhead around the payload, which is the per-module
// "M + 6" byte count of the latency model t = ts + tr + sum(Mi + 6) tb + td.
// The 8b/10b line code, separate start/end words for frames and sub-frames,
// the ID/type/flag fields and the 6-byte overhead follow the document; the
// choice of control symbols, the field order, the additive checksum, the
// flag bit meanings and the type-to-length table are this design's own.
package comm_pkg;

  // One symbol on the byte side of a link: a data byte or a control (K) code.
  typedef struct packed {
    logic       k;
    logic [7:0] d;
  } sym_t;

  // Control symbols (byte value of the K code).
  localparam logic [7:0] K_IDLE = 8'hBC; // K28.5, comma, sent between symbols
  localparam logic [7:0] K_SOF  = 8'hFB; // K27.7, start of frame
  localparam logic [7:0] K_EOF  = 8'hFD; // K29.7, end of frame
  localparam logic [7:0] K_SOSF = 8'hF7; // K23.7, start of sub-frame
  localparam logic [7:0] K_EOSF = 8'hFE; // K30.7, end of sub-frame

  // 10-bit K28.5 in both running disparities, bit order abcdei fghj with a
  // in bit 9 (the first bit on the line).
  localparam logic [9:0] COMMA_NEG = 10'b0011111010;
  localparam logic [9:0] COMMA_POS = 10'b1100000101;

  // Number of overhead bytes per sub-frame (SOSF ID TYPE CHK FLAG EOSF).
  localparam int unsigned SUB_OVERHEAD = 6;

  // Largest payload a TYPE can select.
  localparam int unsigned MAX_PAYLOAD = 256;

  // FLAG bits. A node that owns a sub-frame ORs these into the flag byte.
  localparam int unsigned FLAG_PROCESSED = 0; // the addressed module took the sub-frame
  localparam int unsigned FLAG_CHK_ERR   = 1; // downstream checksum did not match
  localparam int unsigned FLAG_TYPE_ERR  = 2; // unknown data type

  // Payload length for a data type. The low three bits of TYPE select the
  // length; the upper bits are free for the meaning of the data structure.
  function automatic logic [8:0] type_len(input logic [7:0] t);
    unique case (t[2:0])
      3'd0: type_len = 9'd0;
      3'd1: type_len = 9'd16;
      3'd2: type_len = 9'd50;
      3'd3: type_len = 9'd64;
      3'd4: type_len = 9'd128;
      3'd5: type_len = 9'd150;
      3'd6: type_len = 9'd250;
      default: type_len = 9'd256;
    endcase
  endfunction

  // A type is valid when its reserved bit 7 is clear.
  function automatic logic type_ok(input logic [7:0] t);
    return !t[7];
  endfunction

  // --- 8b/10b sub-block tables (RD- column; the RD+ form is the complement
  //     where the code is unbalanced, and for D.07 / x.3) ---------------------

  // 5b/6b, "abcdei" with a in bit 5.
  function automatic logic [5:0] c6_neg(input logic [4:0] x);
    unique case (x)
      5'd0:  c6_neg = 6'b100111;  5'd1:  c6_neg = 6'b011101;
      5'd2:  c6_neg = 6'b101101;  5'd3:  c6_neg = 6'b110001;
      5'd4:  c6_neg = 6'b110101;  5'd5:  c6_neg = 6'b101001;
      5'd6:  c6_neg = 6'b011001;  5'd7:  c6_neg = 6'b111000;
      5'd8:  c6_neg = 6'b111001;  5'd9:  c6_neg = 6'b100101;
      5'd10: c6_neg = 6'b010101;  5'd11: c6_neg = 6'b110100;
      5'd12: c6_neg = 6'b001101;  5'd13: c6_neg = 6'b101100;
      5'd14: c6_neg = 6'b011100;  5'd15: c6_neg = 6'b010111;
      5'd16: c6_neg = 6'b011011;  5'd17: c6_neg = 6'b100011;
      5'd18: c6_neg = 6'b010011;  5'd19: c6_neg = 6'b110010;
      5'd20: c6_neg = 6'b001011;  5'd21: c6_neg = 6'b101010;
      5'd22: c6_neg = 6'b011010;  5'd23: c6_neg = 6'b111010;
      5'd24: c6_neg = 6'b110011;  5'd25: c6_neg = 6'b100110;
      5'd26: c6_neg = 6'b010110;  5'd27: c6_neg = 6'b110110;
      5'd28: c6_neg = 6'b001110;  5'd29: c6_neg = 6'b101110;
      5'd30: c6_neg = 6'b011110;  default: c6_neg = 6'b101011;
    endcase
  endfunction

  localparam logic [5:0] C6_K28 = 6'b001111;

  // 3b/4b data codes, "fghj" with f in bit 3; y = 7 gives the primary form.
  function automatic logic [3:0] c4d_neg(input logic [2:0] y);
    unique case (y)
      3'd0: c4d_neg = 4'b1011;  3'd1: c4d_neg = 4'b1001;
      3'd2: c4d_neg = 4'b0101;  3'd3: c4d_neg = 4'b1100;
      3'd4: c4d_neg = 4'b1101;  3'd5: c4d_neg = 4'b1010;
      3'd6: c4d_neg = 4'b0110;  default: c4d_neg = 4'b1110;
    endcase
  endfunction

  localparam logic [3:0] C4_A7 = 4'b0111;

  // 3b/4b control codes; the RD+ form is always the complement.
  function automatic logic [3:0] c4k_neg(input logic [2:0] y);
    unique case (y)
      3'd0: c4k_neg = 4'b1011;  3'd1: c4k_neg = 4'b0110;
      3'd2: c4k_neg = 4'b1010;  3'd3: c4k_neg = 4'b1100;
      3'd4: c4k_neg = 4'b1101;  3'd5: c4k_neg = 4'b0101;
      3'd6: c4k_neg = 4'b1001;  default: c4k_neg = 4'b0111;
    endcase
  endfunction

  function automatic logic [2:0] ones6(input logic [5:0] c);
    return 3'(c[0]) + 3'(c[1]) + 3'(c[2]) + 3'(c[3]) + 3'(c[4]) + 3'(c[5]);
  endfunction

  function automatic logic [2:0] ones4(input logic [3:0] c);
    return 3'(c[0]) + 3'(c[1]) + 3'(c[2]) + 3'(c[3]);
  endfunction

  // Control codes this network may carry.
  function automatic logic k_valid(input logic [7:0] d);
    return (d[4:0] == 5'd28) ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 ||
                               d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

endpackage
