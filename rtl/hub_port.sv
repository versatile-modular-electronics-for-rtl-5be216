// Frame master for one high-speed port of the central controller.
//
// On `send` it transmits one frame down its chain of modules: SOF, then for
// each configured sub-frame i < n_sub: SOSF, sub_id[i], sub_type[i], the
// payload (length from the type, bytes from the transmit buffer at
// i*MAX_PAYLOAD), the checksum, a zero flag byte and EOSF; then EOF. The frame
// travels through every module and comes back on the receive line. The
// receiver stores each returned payload in the receive buffer at the same
// offset, checks its checksum and ID and keeps its flag byte. When the EOF
// comes back, `done` pulses and `frame_cycles` holds the clocks from `send` to
// that point; `busy` is the hub's latency debug pin (high from the send
// command until the complete frame is back). The document gives the
// master/slave roles, the frame of sub-frames with ID, type and flag, the
// check of the returned data and the debug pin; buffer layout, host port and
// status registers are this design's.
//
// Host port: byte-wide, writes to the transmit buffer, reads (one clock
// latency) from the receive buffer; address = sub-frame * MAX_PAYLOAD + byte.
module hub_port
  import comm_pkg::*;
#(
  parameter int unsigned N_SUB = 4,  // sub-frames (modules) per frame
  localparam int unsigned HAW = $clog2(N_SUB * comm_pkg::MAX_PAYLOAD)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host side
  input  logic                     host_we,
  input  logic [HAW-1:0]           host_addr,
  input  logic [7:0]               host_wdata,
  output logic [7:0]               host_rdata,
  input  logic [$clog2(N_SUB+1)-1:0] n_sub,
  input  logic [7:0]               sub_id   [N_SUB],
  input  logic [7:0]               sub_type [N_SUB],
  input  logic                     send,
  output logic                     busy,
  output logic                     done,
  output logic [31:0]              frame_cycles,
  output logic [7:0]               ret_flag   [N_SUB],
  output logic                     ret_ok     [N_SUB],   // seen, checksum and ID correct
  output logic [15:0]              link_errors,
  // lines
  output logic                     tx_line,
  input  logic                     rx_line
);

  localparam int unsigned SW  = (N_SUB > 1) ? $clog2(N_SUB) : 1;

  typedef enum logic [3:0] {
    T_IDLE, T_SOF, T_SOSF, T_ID, T_TYPE, T_PAY, T_CHK, T_FLAG, T_EOSF, T_EOF, T_WAIT
  } tstate_t;

  logic [7:0] tx_buf [N_SUB * MAX_PAYLOAD];
  logic [7:0] rx_buf [N_SUB * MAX_PAYLOAD];

  // --- transmit ------------------------------------------------------------
  tstate_t    ts;
  logic [SW-1:0] tsub;
  logic [8:0] tidx, tlen;
  logic [7:0] tsum, tx_rd;
  logic       ready, tvalid;
  sym_t       tsym;

  always_ff @(posedge clk) begin
    if (host_we) tx_buf[host_addr] <= host_wdata;
    tx_rd <= tx_buf[HAW'(tsub) * HAW'(MAX_PAYLOAD) + HAW'(tidx)];
  end

  always_comb begin
    tvalid = 1'b1;
    tsym   = '{k: 1'b0, d: 8'h00};
    unique case (ts)
      T_SOF:  tsym = '{k: 1'b1, d: K_SOF};
      T_SOSF: tsym = '{k: 1'b1, d: K_SOSF};
      T_ID:   tsym.d = sub_id[tsub];
      T_TYPE: tsym.d = sub_type[tsub];
      T_PAY:  tsym.d = tx_rd;
      T_CHK:  tsym.d = tsum;
      T_FLAG: tsym.d = 8'h00;
      T_EOSF: tsym = '{k: 1'b1, d: K_EOSF};
      T_EOF:  tsym = '{k: 1'b1, d: K_EOF};
      default: tvalid = 1'b0;
    endcase
  end

  logic rx_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts           <= T_IDLE;
      tsub         <= '0;
      tidx         <= '0;
      tlen         <= '0;
      tsum         <= '0;
      busy         <= 1'b0;
      frame_cycles <= '0;
    end else begin
      if (busy) frame_cycles <= frame_cycles + 32'd1;
      if (ts == T_IDLE && send) begin
        busy         <= 1'b1;
        frame_cycles <= 32'd1;
        ts           <= T_SOF;
        tsub         <= '0;
      end else if (ts == T_WAIT) begin
        if (rx_done) begin
          busy <= 1'b0;
          ts   <= T_IDLE;
        end
      end else if (ready && ts != T_IDLE) begin
        unique case (ts)
          T_SOF:  ts <= (n_sub == '0) ? T_EOF : T_SOSF;
          T_SOSF: ts <= T_ID;
          T_ID: begin
            tsum <= sub_id[tsub];
            ts   <= T_TYPE;
          end
          T_TYPE: begin
            tsum <= tsum + sub_type[tsub];
            tlen <= type_len(sub_type[tsub]);
            tidx <= '0;
            ts   <= (type_len(sub_type[tsub]) == 9'd0) ? T_CHK : T_PAY;
          end
          T_PAY: begin
            tsum <= tsum + tx_rd;
            tidx <= tidx + 9'd1;
            if (tidx + 9'd1 == tlen) ts <= T_CHK;
          end
          T_CHK:  ts <= T_FLAG;
          T_FLAG: ts <= T_EOSF;
          T_EOSF: begin
            if (32'(tsub) + 1 >= 32'(n_sub)) ts <= T_EOF;
            else begin
              tsub <= tsub + 1'b1;
              ts   <= T_SOSF;
            end
          end
          T_EOF:  ts <= T_WAIT;
          default: ts <= T_IDLE;
        endcase
      end
    end
  end

  link_tx u_tx (
    .clk, .rst_n,
    .ready,
    .in_valid (tvalid && ts != T_IDLE && ts != T_WAIT),
    .in_sym   (tsym),
    .line     (tx_line)
  );

  // --- receive ---------------------------------------------------------------
  typedef enum logic [2:0] {
    R_IDLE, R_FRAME, R_ID, R_TYPE, R_PAY, R_CHK, R_FLAG, R_EOSF
  } rstate_t;

  logic       rvalid, raligned, rserr;
  sym_t       rsym;
  rstate_t    rs;
  logic [SW:0] rsub;
  logic [8:0] ridx, rlen;
  logic [7:0] rsum;
  logic       rid_ok, rchk_ok;
  logic       rwe;
  logic [HAW-1:0] rwaddr;
  logic [7:0] rwdata;

  link_rx u_rx (
    .clk, .rst_n,
    .line      (rx_line),
    .out_valid (rvalid),
    .out_sym   (rsym),
    .aligned   (raligned),
    .sym_err   (rserr),
    .err_count (link_errors)
  );

  always_ff @(posedge clk) begin
    if (rwe) rx_buf[rwaddr] <= rwdata;
    host_rdata <= rx_buf[host_addr];
  end

  always_comb begin
    rwe    = rvalid && rs == R_PAY && !rsym.k && rsub < (SW+1)'(N_SUB);
    rwaddr = HAW'(rsub) * HAW'(MAX_PAYLOAD) + HAW'(ridx);
    rwdata = rsym.d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs      <= R_IDLE;
      rsub    <= '0;
      ridx    <= '0;
      rlen    <= '0;
      rsum    <= '0;
      rid_ok  <= 1'b0;
      rchk_ok <= 1'b0;
      rx_done <= 1'b0;
      done    <= 1'b0;
      for (int i = 0; i < N_SUB; i++) begin
        ret_flag[i] <= '0;
        ret_ok[i]   <= 1'b0;
      end
    end else begin
      rx_done <= 1'b0;
      done    <= rx_done;
      if (ts == T_IDLE && send) begin
        for (int i = 0; i < N_SUB; i++) begin
          ret_flag[i] <= '0;
          ret_ok[i]   <= 1'b0;
        end
      end
      if (rvalid) begin
        if (rsym.k && rsym.d == K_SOF) begin
          rs   <= R_FRAME;
          rsub <= '0;
        end else if (rsym.k && rsym.d == K_EOF) begin
          rs      <= R_IDLE;
          rx_done <= (rs == R_FRAME) && busy;
        end else begin
          unique case (rs)
            R_IDLE:  ;
            R_FRAME: if (rsym.k && rsym.d == K_SOSF) rs <= R_ID;
            R_ID: begin
              rsum   <= rsym.d;
              rid_ok <= rsub < (SW+1)'(N_SUB) && rsym.d == sub_id[SW'(rsub)];
              rs     <= rsym.k ? R_FRAME : R_TYPE;
            end
            R_TYPE: begin
              rsum <= rsum + rsym.d;
              rlen <= type_len(rsym.d);
              ridx <= '0;
              rs   <= rsym.k ? R_FRAME : (type_len(rsym.d) == 9'd0 ? R_CHK : R_PAY);
            end
            R_PAY: begin
              if (rsym.k) rs <= R_FRAME;
              else begin
                rsum <= rsum + rsym.d;
                ridx <= ridx + 9'd1;
                if (ridx + 9'd1 == rlen) rs <= R_CHK;
              end
            end
            R_CHK: begin
              rchk_ok <= !rsym.k && rsym.d == rsum;
              rs      <= rsym.k ? R_FRAME : R_FLAG;
            end
            R_FLAG: begin
              if (rsub < (SW+1)'(N_SUB)) ret_flag[SW'(rsub)] <= rsym.d;
              rs <= rsym.k ? R_FRAME : R_EOSF;
            end
            R_EOSF: begin
              if (rsub < (SW+1)'(N_SUB))
                ret_ok[SW'(rsub)] <= rsym.k && rsym.d == K_EOSF && rid_ok && rchk_ok;
              rsub <= rsub + 1'b1;
              rs   <= R_FRAME;
            end
            default: rs <= R_IDLE;
          endcase
        end
      end
    end
  end

endmodule
