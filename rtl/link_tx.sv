// Transmit side of one LVDS link: 8b/10b encoder feeding the serializer.
//
// Once every ten clocks `ready` pulses; a symbol presented with in_valid in
// that clock is sent, otherwise the idle comma K28.5 goes out, which keeps the
// far receiver aligned and the running disparity correct. One symbol therefore
// takes ten clocks on the line (50 ns per byte at 200 Mb/s, the document's
// t_b). Latency from the ready clock to the first line bit is three clocks.
module link_tx
  import comm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic ready,
  input  logic in_valid,
  input  sym_t in_sym,
  output logic line
);

  logic       code_valid, k_err, rd_pos;
  logic [9:0] code;
  sym_t       s;

  assign s = in_valid ? in_sym : sym_t'{k: 1'b1, d: K_IDLE};

  enc8b10b u_enc (
    .clk, .rst_n,
    .in_valid (ready),
    .in_k     (s.k),
    .in_d     (s.d),
    .code_valid,
    .code,
    .k_err,
    .rd_pos
  );

  serdes_tx u_ser (
    .clk, .rst_n,
    .word (code),
    .req  (ready),
    .line
  );

endmodule
