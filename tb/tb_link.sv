// Self-checking test of one LVDS link (link_tx -> line -> link_rx).
// Sends a stream of random data bytes and all control codes of the network,
// with idle gaps, and checks that every symbol arrives once, in order, with no
// code or disparity error, that the receiver aligned on the idle commas, that
// symbols are spaced ten clocks apart (10 line bits per byte), and that a
// flipped bit on the line is reported as an error.
module tb_link;
  import comm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ready, in_valid, line, flip = 0, out_valid, aligned, sym_err;
  sym_t in_sym, out_sym;
  logic [15:0] err_count;

  link_tx u_tx (.clk, .rst_n, .ready, .in_valid, .in_sym, .line);
  link_rx dut  (.clk, .rst_n, .line(line ^ flip), .out_valid, .out_sym, .aligned, .sym_err, .err_count);

  sym_t sent [$];
  int   n_sent = 0, n_recv = 0, last_t = -1, t = 0, n_ready = 0;
  logic [7:0] ks [4] = '{K_SOF, K_EOF, K_SOSF, K_EOSF};

  always @(posedge clk) t++;

  // source: after 300 clocks, send on most ready pulses
  always_comb begin
    in_valid = 1'b0;
    in_sym   = '0;
    if (rst_n && t > 300 && n_sent < 600 && (n_ready % 7 != 3)) begin
      in_valid = 1'b1;
      in_sym   = (n_sent % 11 == 5) ? sym_t'{k: 1'b1, d: ks[(n_sent / 11) % 4]}
                                    : sym_t'{k: 1'b0, d: 8'((n_sent * 73 + 19) ^ (n_sent >> 3))};
    end
  end

  always @(posedge clk) if (ready) n_ready++;
  always @(posedge clk) if (ready && in_valid) begin
    sent.push_back(in_sym);
    n_sent++;
  end

  always @(posedge clk) if (out_valid && n_recv < 600) begin
    sym_t e;
    e = sent.pop_front();
    check(out_sym == e, $sformatf("symbol %0d: got %0d/%h expected %0d/%h", n_recv, out_sym.k, out_sym.d, e.k, e.d));
    check(!sym_err, "no symbol error");
    if (last_t >= 0) check((t - last_t) % 10 == 0, "symbol spacing multiple of 10 clocks");
    last_t = t;
    n_recv++;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (n_recv == 600);
    check(aligned, "receiver aligned");
    check(err_count == 0, "no errors counted");
    // corrupt one bit: the code or disparity check must notice
    repeat (200) @(posedge clk);
    @(negedge clk) flip = 1;
    @(negedge clk) flip = 0;
    repeat (40) @(posedge clk);
    check(err_count != 0, "flipped line bit detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
