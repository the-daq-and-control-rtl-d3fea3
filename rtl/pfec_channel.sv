// pfec_channel: one Pixel FEC channel (programming link to sensor modules).
//
// Programming bytes are loaded into a 16 kB transmit FIFO (fifo_wr,
// fifo_data). A send request (the Send Data register bit or the TTC Send Data
// command, OR-ed by the caller) starts the transmit FSM, which sends, 8b/10b
// encoded, one character per BX:
//   K.28.0 (start), {hub[4:0], port[2:0]}, nbytes[13:8], nbytes[7:0],
//   nbytes data bytes from the FIFO, K.28.4 (end); K.28.5 when idle.
// After the end character it tells the receive FSM that a transmission
// ended and waits for it. The receive FSM samples the returned data line
// once per BX; it waits for the start condition (eight consecutive '1's),
// then takes eight bits, the echo of the hub/port byte. A matching echo
// ends the command with done, a wrong one with rx_err; if no start
// condition arrives within TIMEOUT_BX BX (100 BX = 2.5 us) the command ends
// with timeout. Only then can the next send start. hub, port and nbytes are
// register values held stable during a command.
// FIFO size, 8b/10b coding, the start condition, the handshake and the
// 100-BX limit follow the Pixel FEC description; the character sequence of a
// command, the echo and sampling the return line with the BX enable (rather
// than with the returned clock) are this design's choices.
module pfec_channel #(
  parameter int TX_BYTES   = 16384,
  parameter int TIMEOUT_BX = 100,
  localparam int LW = $clog2(TX_BYTES) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce40,
  input  logic        fifo_wr,
  input  logic [7:0]  fifo_data,
  input  logic        send,
  input  logic [4:0]  hub,
  input  logic [2:0]  port,
  input  logic [13:0] nbytes,
  output logic [9:0]  tx,
  input  logic        rx_bit,
  output logic        busy,
  output logic        done,
  output logic        timeout,
  output logic        rx_err,
  output logic [LW-1:0] fifo_level
);
  typedef enum logic [2:0] {T_IDLE, T_SOF, T_ADDR, T_CNTH, T_CNTL, T_DATA, T_EOF, T_WAIT} tstate_t;
  typedef enum logic [1:0] {R_OFF, R_START, R_BYTE} rstate_t;
  tstate_t ts;
  rstate_t rsm;
  logic [13:0] left;
  logic        k;
  logic [7:0]  d;
  logic        pop;
  logic [7:0]  fifo_q;
  logic        fifo_empty;
  logic        send_q;
  logic [7:0]  tmo;
  logic [3:0]  ones;
  logic [2:0]  nb;
  logic [6:0]  rx_sr;
  logic        rx_start, rx_ok, rx_bad, rx_to;

  sync_fifo #(.WIDTH(8), .DEPTH(TX_BYTES)) u_txf (
    .clk, .rst_n, .wr_en(fifo_wr), .wr_data(fifo_data), .rd_en(pop),
    .rd_data(fifo_q), .empty(fifo_empty), .full(), .level(fifo_level)
  );

  // character for the current state
  always_comb begin
    k = 1'b0; d = 8'hBC;           // K.28.5 idle
    pop = 1'b0;
    case (ts)
      T_IDLE, T_WAIT: begin k = 1'b1; d = 8'hBC; end
      T_SOF:  begin k = 1'b1; d = 8'h1C; end   // K.28.0
      T_ADDR: d = {hub, port};
      T_CNTH: d = {2'b00, nbytes[13:8]};
      T_CNTL: d = nbytes[7:0];
      T_DATA: begin
        if (fifo_empty) begin k = 1'b1; d = 8'hBC; end   // wait for data
        else begin d = fifo_q; pop = ce40; end
      end
      T_EOF:  begin k = 1'b1; d = 8'h9C; end   // K.28.4
      default: ;
    endcase
  end

  enc8b10b u_enc (.clk, .rst_n, .en(ce40), .k, .d, .q(tx), .rd_pos());

  assign busy     = (ts != T_IDLE);
  assign rx_start = ce40 && (ts == T_EOF);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ts <= T_IDLE; left <= '0; send_q <= 1'b0;
      done <= 1'b0; timeout <= 1'b0; rx_err <= 1'b0;
    end else begin
      if (send) send_q <= 1'b1;
      if (ce40) begin
        done <= 1'b0; timeout <= 1'b0; rx_err <= 1'b0;
        case (ts)
          T_IDLE: if (send_q || send) begin ts <= T_SOF; send_q <= 1'b0; end
          T_SOF:  ts <= T_ADDR;
          T_ADDR: ts <= T_CNTH;
          T_CNTH: ts <= T_CNTL;
          T_CNTL: begin left <= nbytes; ts <= (nbytes == 0) ? T_EOF : T_DATA; end
          T_DATA: if (!fifo_empty) begin
            left <= left - 14'd1;
            if (left == 14'd1) ts <= T_EOF;
          end
          T_EOF:  ts <= T_WAIT;
          T_WAIT: begin
            if (rx_ok)  begin done <= 1'b1;    ts <= T_IDLE; end
            if (rx_bad) begin rx_err <= 1'b1;  ts <= T_IDLE; end
            if (rx_to)  begin timeout <= 1'b1; ts <= T_IDLE; end
          end
          default: ts <= T_IDLE;
        endcase
      end
    end
  end

  // receive FSM
  assign rx_ok  = (rsm == R_BYTE) && (nb == 3'd7) && ({rx_sr[6:0], rx_bit} == {hub, port});
  assign rx_bad = (rsm == R_BYTE) && (nb == 3'd7) && ({rx_sr[6:0], rx_bit} != {hub, port});
  assign rx_to  = (rsm == R_START) && (tmo == 8'(TIMEOUT_BX - 1)) && !(ones == 4'd7 && rx_bit);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsm <= R_OFF; tmo <= '0; ones <= '0; nb <= '0; rx_sr <= '0;
    end else if (ce40) begin
      case (rsm)
        R_OFF: if (rx_start) begin rsm <= R_START; tmo <= '0; ones <= '0; end
        R_START: begin
          tmo  <= tmo + 8'd1;
          ones <= rx_bit ? ones + 4'd1 : 4'd0;
          if (ones == 4'd7 && rx_bit) begin rsm <= R_BYTE; nb <= '0; end
          else if (rx_to) rsm <= R_OFF;
        end
        R_BYTE: begin
          rx_sr <= {rx_sr[5:0], rx_bit};
          nb    <= nb + 3'd1;
          if (nb == 3'd7) rsm <= R_OFF;
        end
        default: rsm <= R_OFF;
      endcase
    end
  end
endmodule
