// Self-checking test of the 8b/10b decoder. Feeds it reference code words
// from the published tables, every data byte and control code produced by the
// encoder (round trip), and corrupted words that must raise code_err or
// disp_err.
module tb_dec8b10b;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic       e_valid = 0, e_k = 0, k_err, rd_pos;
  logic [7:0] e_d = 0;
  logic       cv, out_valid, out_k, code_err, disp_err;
  logic [9:0] ecode, code;
  logic       inject = 0;
  logic [9:0] inj_code = 0;
  logic [7:0] out_d;

  enc8b10b u_enc (.clk, .rst_n, .in_valid(e_valid), .in_k(e_k), .in_d(e_d),
                  .code_valid(cv), .code(ecode), .k_err, .rd_pos);
  dec8b10b dut (.clk, .rst_n, .code_valid(inject ? 1'b1 : cv),
                .code(inject ? inj_code : ecode),
                .out_valid, .out_k, .out_d, .code_err, .disp_err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rt(input logic k, input logic [7:0] d);
    @(negedge clk); e_valid = 1; e_k = k; e_d = d;
    @(negedge clk); e_valid = 0;
    @(negedge clk);
    check(out_valid && out_d == d && out_k == k && !code_err && !disp_err,
          $sformatf("round trip k=%0d d=%h got k=%0d d=%h ce=%0d de=%0d", k, d, out_k, out_d, code_err, disp_err));
  endtask

  task automatic raw(input logic [9:0] w, input logic k, input logic [7:0] d, input bit bad);
    @(negedge clk); inject = 1; inj_code = w;
    @(negedge clk); inject = 0;
    if (bad) check(code_err || disp_err, $sformatf("error flagged for %b", w));
    else check(out_d == d && out_k == k && !code_err, $sformatf("decode %b -> %h", w, out_d));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++)
      for (int v = 0; v < 256; v++) rt(0, 8'(v));
    for (int j = 0; j < 8; j++) rt(1, 8'({3'(j), 5'd28}));
    rt(1, 8'hF7); rt(1, 8'hFB); rt(1, 8'hFD); rt(1, 8'hFE);
    // reference words; decoder RD follows the words it receives
    raw(10'b0011111010, 1, 8'hBC, 0);   // K28.5 RD-
    raw(10'b1100000101, 1, 8'hBC, 0);   // K28.5 RD+
    raw(10'b1010101010, 0, 8'hB5, 0);   // D21.5
    raw(10'b1001110100, 0, 8'h00, 0);   // D0.0
    raw(10'b0000000000, 0, 8'h00, 1);   // not a code word
    raw(10'b1111110000, 0, 8'h00, 1);   // not a code word
    raw(10'b1001110100, 0, 8'h00, 0);   // D0.0 RD- again: fine
    raw(10'b1001111011, 0, 8'h00, 1);   // D0.0 6b RD- with 4b 1011: disparity error
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
