// Communication node of one FPGA module (the "custom controller").
//
// Each module has two LVDS links: an upstream link towards the central hub and
// a downstream link towards the next module of the chain. A frame arrives on
// the upstream receive line and is forwarded, byte for byte, on the downstream
// transmit line through a small FIFO that starts sending once START_FILL
// symbols are in it (the document: "buffered for 4 bytes"). While it passes,
// the node watches for the sub-frame whose ID equals my_id: it writes that
// sub-frame's payload into the receive area of the shared memory and at the
// same time replaces each payload byte with the byte at the same offset of the
// transmit area, then rewrites the checksum and ORs its status into the flag
// byte. All other sub-frames pass unchanged. The returning (upstream) stream
// is not processed: the downstream receive line is re-timed by one flip-flop
// and driven onto the upstream transmit line. The last module of a chain has
// `loopback` set and turns its own processed output back upstream, so a chain
// needs one cable. These behaviours are the document's; the field order,
// checksum, flag bits, memory layout, FIFO depth and the three-clock memory
// pipeline are this design's (see comm_pkg).
//
// Memory port: byte-wide, one access per clock, read data one clock after the
// address. Receive payload byte k goes to RX_BASE + k, transmit payload byte
// k is read from TX_BASE + k.
// Timing: one symbol every ten clocks per link; the node adds the deserializer
// word, three pipeline clocks, START_FILL symbols of buffering and the
// serializer phase to the downstream path, and one clock upstream.
module node_ctrl
  import comm_pkg::*;
#(
  parameter int unsigned AW         = 10,   // byte address width of the memory port
  parameter int unsigned RX_BASE    = 0,
  parameter int unsigned TX_BASE    = 256,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned START_FILL = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    my_id,
  input  logic          loopback,     // last module of its chain
  // links
  input  logic          up_rx,        // from the hub side
  output logic          up_tx,        // to the hub side
  output logic          dn_tx,        // to the next module
  input  logic          dn_rx,        // from the next module
  // shared memory port
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  input  logic [7:0]    mem_rdata,
  // status
  output logic          in_frame,     // high from start to end of frame (debug pin)
  output logic          rx_update,    // own sub-frame taken without error
  output logic [7:0]    rx_type,      // its data type
  output logic          rx_error,     // own sub-frame had a checksum or type error
  output logic [15:0]   proto_errors, // malformed sub-frames seen
  output logic [15:0]   link_errors   // 8b/10b errors on the upstream receive line
);

  typedef enum logic [2:0] {
    S_IDLE, S_FRAME, S_ID, S_TYPE, S_PAY, S_CHK, S_FLAG, S_EOSF
  } state_t;

  // --- upstream receive ----------------------------------------------------
  logic rx_valid, rx_aligned, rx_serr;
  sym_t rx_sym;

  link_rx u_up_rx (
    .clk, .rst_n,
    .line      (up_rx),
    .out_valid (rx_valid),
    .out_sym   (rx_sym),
    .aligned   (rx_aligned),
    .sym_err   (rx_serr),
    .err_count (link_errors)
  );

  // --- sub-frame parser and payload exchange -------------------------------
  state_t     st;
  logic       match, chk_err, type_err;
  logic [8:0] len, idx;
  logic [7:0] in_sum, out_sum;
  // three-stage pipeline: p1 = memory write, p2 = memory read, p3 = push
  logic       p1, p2, p3;
  sym_t       ps;          // symbol in flight
  logic       ps_swap;     // replace by memory read data
  logic [8:0] ps_idx;
  sym_t       push_sym;
  logic       push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      match        <= 1'b0;
      chk_err      <= 1'b0;
      type_err     <= 1'b0;
      len          <= '0;
      idx          <= '0;
      in_sum       <= '0;
      out_sum      <= '0;
      p1           <= 1'b0;
      p2           <= 1'b0;
      p3           <= 1'b0;
      ps           <= '0;
      ps_swap      <= 1'b0;
      ps_idx       <= '0;
      in_frame     <= 1'b0;
      rx_update    <= 1'b0;
      rx_error     <= 1'b0;
      rx_type      <= '0;
      proto_errors <= '0;
    end else begin
      p1        <= 1'b0;
      p2        <= p1;
      p3        <= p2;
      rx_update <= 1'b0;
      rx_error  <= 1'b0;

      // The outgoing checksum counts the bytes as they leave the pipeline.
      if (p3 && ps_swap)
        out_sum <= out_sum + push_sym.d;

      if (rx_valid) begin
        p1      <= 1'b1;
        ps      <= rx_sym;
        ps_swap <= 1'b0;
        ps_idx  <= idx;
        if (rx_sym.k && rx_sym.d == K_SOF) begin
          in_frame <= 1'b1;
          st       <= S_FRAME;
          if (st != S_IDLE && st != S_FRAME) proto_errors <= proto_errors + 16'd1;
        end else if (rx_sym.k && rx_sym.d == K_EOF) begin
          in_frame <= 1'b0;
          st       <= S_IDLE;
          if (st != S_FRAME) proto_errors <= proto_errors + 16'd1;
        end else begin
          unique case (st)
            S_IDLE: ; // bytes outside a frame are forwarded untouched
            S_FRAME: begin
              if (rx_sym.k && rx_sym.d == K_SOSF) st <= S_ID;
              else proto_errors <= proto_errors + 16'd1;
            end
            S_ID: begin
              if (rx_sym.k) begin
                st <= S_FRAME;
                proto_errors <= proto_errors + 16'd1;
              end else begin
                match   <= (rx_sym.d == my_id);
                in_sum  <= rx_sym.d;
                out_sum <= rx_sym.d;
                st      <= S_TYPE;
              end
            end
            S_TYPE: begin
              if (rx_sym.k) begin
                st <= S_FRAME;
                proto_errors <= proto_errors + 16'd1;
              end else begin
                len      <= type_len(rx_sym.d);
                idx      <= '0;
                type_err <= !type_ok(rx_sym.d);
                chk_err  <= 1'b0;
                in_sum   <= in_sum + rx_sym.d;
                out_sum  <= out_sum + rx_sym.d;
                if (match) rx_type <= rx_sym.d;
                st       <= (type_len(rx_sym.d) == 9'd0) ? S_CHK : S_PAY;
              end
            end
            S_PAY: begin
              if (rx_sym.k) begin
                st    <= S_FRAME;
                match <= 1'b0;
                proto_errors <= proto_errors + 16'd1;
              end else begin
                in_sum  <= in_sum + rx_sym.d;
                ps_swap <= match && !type_err;
                idx     <= idx + 9'd1;
                if (idx + 9'd1 == len) st <= S_CHK;
              end
            end
            S_CHK: begin
              if (rx_sym.k) begin
                st    <= S_FRAME;
                match <= 1'b0;
                proto_errors <= proto_errors + 16'd1;
              end else begin
                if (match) begin
                  chk_err <= (rx_sym.d != in_sum);
                  ps.d    <= out_sum;
                end
                st <= S_FLAG;
              end
            end
            S_FLAG: begin
              if (rx_sym.k) begin
                st    <= S_FRAME;
                match <= 1'b0;
                proto_errors <= proto_errors + 16'd1;
              end else begin
                if (match) begin
                  ps.d <= rx_sym.d | (8'd1 << FLAG_PROCESSED)
                                   | (8'(chk_err)  << FLAG_CHK_ERR)
                                   | (8'(type_err) << FLAG_TYPE_ERR);
                end
                st <= S_EOSF;
              end
            end
            S_EOSF: begin
              st <= S_FRAME;
              if (rx_sym.k && rx_sym.d == K_EOSF) begin
                if (match) begin
                  rx_update <= !chk_err && !type_err;
                  rx_error  <= chk_err || type_err;
                end
              end else begin
                proto_errors <= proto_errors + 16'd1;
              end
              match <= 1'b0;
            end
            default: st <= S_IDLE;
          endcase
        end
      end
    end
  end

  // Memory access: p1 writes the received payload byte, p2 reads the byte to
  // send in its place.
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = ps.d;
    if (p1 && ps_swap) begin
      mem_en   = 1'b1;
      mem_we   = 1'b1;
      mem_addr = AW'(RX_BASE) + AW'(ps_idx);
    end else if (p2 && ps_swap) begin
      mem_en   = 1'b1;
      mem_addr = AW'(TX_BASE) + AW'(ps_idx);
    end
  end

  assign push     = p3;
  assign push_sym = ps_swap ? sym_t'{k: 1'b0, d: mem_rdata} : ps;

  // --- forwarding FIFO and downstream transmit ------------------------------
  sym_t                          f_dout;
  logic [$clog2(FIFO_DEPTH):0]   f_count;
  logic                          f_ovf, tx_ready, pop, drain;

  sym_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push     (push),
    .din      (push_sym),
    .pop      (pop),
    .dout     (f_dout),
    .count    (f_count),
    .overflow (f_ovf)
  );

  // Once START_FILL symbols are buffered the FIFO is emptied at line rate;
  // `drain` keeps it going after the end of frame has gone in.
  logic sending;
  assign pop = tx_ready && (f_count != '0) &&
               (sending || f_count >= ($clog2(FIFO_DEPTH)+1)'(START_FILL) || drain);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drain   <= 1'b0;
      sending <= 1'b0;
    end else begin
      if (push && push_sym.k && push_sym.d == K_EOF) drain <= 1'b1;
      else if (pop && f_dout.k && f_dout.d == K_EOF) drain <= 1'b0;
      if (pop && f_dout.k && f_dout.d == K_EOF)      sending <= 1'b0;
      else if (pop)                                  sending <= 1'b1;
    end
  end

  link_tx u_dn_tx (
    .clk, .rst_n,
    .ready    (tx_ready),
    .in_valid (pop),
    .in_sym   (f_dout),
    .line     (dn_tx)
  );

  // --- upstream: unbuffered return path -------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) up_tx <= 1'b0;
    else        up_tx <= loopback ? dn_tx : dn_rx;
  end

  // Protocol rules of the forwarding path.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !f_ovf)
    else $error("node_ctrl: forwarding FIFO overflow");

endmodule
