// Receive side of one LVDS link: deserializer feeding the 8b/10b decoder.
//
// Delivers each received symbol except the idle comma, with the decoder's
// code and disparity error flags; err_count counts words with either error.
// Symbols arrive at most once every ten clocks.
module link_rx
  import comm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        line,
  output logic        out_valid,
  output sym_t        out_sym,
  output logic        aligned,
  output logic        sym_err,
  output logic [15:0] err_count
);

  logic       wv, dv, dk, cerr, derr;
  logic [9:0] w;
  logic [7:0] dd;

  serdes_rx u_des (
    .clk, .rst_n,
    .line,
    .word_valid (wv),
    .word       (w),
    .aligned
  );

  dec8b10b u_dec (
    .clk, .rst_n,
    .code_valid (wv),
    .code       (w),
    .out_valid  (dv),
    .out_k      (dk),
    .out_d      (dd),
    .code_err   (cerr),
    .disp_err   (derr)
  );

  assign out_valid = dv && !(dk && dd == K_IDLE);
  assign out_sym   = '{k: dk, d: dd};
  assign sym_err   = dv && (cerr || derr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       err_count <= '0;
    else if (sym_err) err_count <= err_count + 16'd1;
  end

endmodule
