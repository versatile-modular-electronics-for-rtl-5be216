// Self-checking test of the 8b/10b encoder. Checks code words taken from the
// published 8b/10b tables for both running disparities, then encodes every
// data byte and every control code several times and checks that each word
// has 4, 5 or 6 ones, that the running disparity stays within +-1 (never two
// unbalanced words of the same sign in a row), that runs never exceed five
// equal bits, and that the comma K28.5 is the only word with the comma pattern.
module tb_enc8b10b;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, in_k = 0;
  logic [7:0] in_d = 0;
  logic       code_valid, k_err, rd_pos;
  logic [9:0] code;

  enc8b10b dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Encode one symbol and return the word.
  task automatic enc(input logic k, input logic [7:0] d, output logic [9:0] w);
    @(negedge clk); in_valid = 1; in_k = k; in_d = d;
    @(negedge clk); in_valid = 0;
    w = code;
  endtask

  function automatic int ones(input logic [9:0] w);
    int n = 0;
    for (int i = 0; i < 10; i++) n += w[i];
    return n;
  endfunction

  logic [9:0] w;
  int disp, run, last_bit;
  logic [19:0] stream;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Reference words (abcdei fghj), starting at RD-.
    enc(1, 8'hBC, w); check(w == 10'b0011111010, "K28.5 RD-");
    enc(1, 8'hBC, w); check(w == 10'b1100000101, "K28.5 RD+");
    enc(0, 8'h00, w); check(w == 10'b1001110100, "D0.0 RD-");
    enc(1, 8'h3C, w); check(w == 10'b0011111001, "K28.1 RD-");
    enc(0, 8'h00, w); check(w == 10'b0110001011, "D0.0 RD+");
    enc(0, 8'hB5, w); check(w == 10'b1010101010, "D21.5");
    enc(1, 8'hFB, w); check(w == 10'b0010010111, "K27.7 RD+");
    enc(1, 8'hF7, w); check(w == 10'b0001010111, "K23.7 RD+");
    enc(0, 8'hF1, w); check(w == 10'b1000110001, "D17.7 RD+ (primary)");
    enc(0, 8'hF1, w); check(w == 10'b1000110111, "D17.7 RD- (alternate)");
    enc(0, 8'h07, w); check(w == 10'b0001110100 || w == 10'b1110001011, "D7.0");
    // Disparity and run-length over everything.
    disp = rd_pos ? 1 : -1;
    run = 0; last_bit = 2;
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 256 + 12; v++) begin
        logic k; logic [7:0] d;
        if (v < 256) begin k = 0; d = 8'(v); end
        else begin
          k = 1;
          d = (v - 256 < 8) ? 8'({3'(v - 256), 5'd28})
            : (v == 264 ? 8'hF7 : v == 265 ? 8'hFB : v == 266 ? 8'hFD : 8'hFE);
        end
        enc(k, d, w);
        check(ones(w) >= 4 && ones(w) <= 6, $sformatf("balance of %0d", v));
        if (ones(w) == 6) begin check(disp == -1, "RD rule +"); disp = 1; end
        if (ones(w) == 4) begin check(disp == 1, "RD rule -");  disp = -1; end
        for (int i = 9; i >= 0; i--) begin
          if (w[i] == last_bit) run++; else run = 1;
          last_bit = w[i];
          check(run <= 5, $sformatf("run length at %0d", v));
        end
        if (!(k && d == 8'hBC) && !(k && d[4:0] == 5'd28 && (d[7:5] == 1 || d[7:5] == 7)))
          check(w[9:3] != 7'b0011111 && w[9:3] != 7'b1100000, $sformatf("no comma in %0d", v));
        check(!k_err, "no k_err");
      end
    end
    enc(1, 8'h00, w); check(k_err, "invalid K flagged");
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
