// ctrl_ring: CTRL_RING block of the Tracker FEC, master of one CCU token ring.
//
// The ring is a serial loop: the master sends on tx and gets everything
// back on rx after it has passed all CCUs. Ring A is used by default; with
// sel_b the master sends and listens on the B path instead, which bypasses a
// failed DOH or CCU. When nothing is to be sent the line carries the idle
// pattern 1010... .
// Frames are 40 bits, MSB first: flag 0x7E, type, address, register, data.
//   type 0x01 token frame (address 0, register = sequence number,
//             data = sequence number XOR 0xA5);
//   type 0x02 register write, 0x03 register read, addressed to one CCU;
//   a CCU answers a command with type | 0x80 and, for a read, the data.
// The master injects a token frame at start-up and before every command and
// checks that the same frame comes back within TIMEOUT clocks; the result is
// kept in the status register (ring_ok, counts of good and failed token
// checks). A command is sent only if the token check passed, then the master
// waits (TIMEOUT clocks) for the reply and reports cmd_done with cmd_ok and
// the read data. The receiver hunts for the flag at any bit offset.
// This block runs on its own clock (no LHC timing). Idle pattern, token
// check at start-up and before each command, status register and A/B ring
// selection follow the Tracker FEC description; the CCU link protocol itself
// is not reproduced: the frame format above is this design's own.
module ctrl_ring #(
  parameter int TIMEOUT = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel_b,
  input  logic        cmd_valid,
  input  logic        cmd_read,
  input  logic [7:0]  cmd_addr,
  input  logic [7:0]  cmd_reg,
  input  logic [7:0]  cmd_data,
  output logic        cmd_ready,
  output logic        cmd_done,
  output logic        cmd_ok,
  output logic [7:0]  rd_data,
  output logic        tx_a,
  output logic        tx_b,
  input  logic        rx_a,
  input  logic        rx_b,
  output logic        ring_ok,
  output logic [15:0] token_good,
  output logic [15:0] token_bad
);
  localparam logic [7:0] FLAG = 8'h7E;
  localparam int WTW = $clog2(TIMEOUT + 1);
  typedef enum logic [2:0] {M_TOKEN, M_TWAIT, M_IDLE, M_CMD, M_CWAIT} mstate_t;
  mstate_t ms;
  logic [39:0] tsr;
  logic [5:0]  tcnt;           // bits left in tsr
  logic        tbit, idle_ph;
  logic        rx;
  logic [6:0]  hunt;
  logic [30:0] rsr;
  logic [5:0]  rcnt;
  logic        rin;            // receiving a frame body
  logic        fr_v;
  logic [31:0] fr;
  logic [7:0]  seq;
  logic [WTW-1:0] wt;
  logic        pend;           // command accepted, waiting for token
  logic        p_read;
  logic [7:0]  p_addr, p_reg, p_data;
  logic        load;
  logic [39:0] load_frame;

  assign rx   = sel_b ? rx_b : rx_a;
  assign tbit = (tcnt != 0) ? tsr[39] : idle_ph;
  assign tx_a = sel_b ? idle_ph : tbit;
  assign tx_b = sel_b ? tbit : idle_ph;
  assign cmd_ready = (ms == M_IDLE) && !pend;

  // transmitter
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tsr <= '0; tcnt <= '0; idle_ph <= 1'b1;
    end else begin
      idle_ph <= ~idle_ph;
      if (load) begin
        tsr <= load_frame; tcnt <= 6'd40;
      end else if (tcnt != 0) begin
        tsr <= {tsr[38:0], 1'b0}; tcnt <= tcnt - 6'd1;
      end
    end
  end

  // receiver: flag hunt, then 32 bits
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hunt <= '0; rsr <= '0; rcnt <= '0; rin <= 1'b0; fr_v <= 1'b0; fr <= '0;
    end else begin
      fr_v <= 1'b0;
      if (!rin) begin
        hunt <= {hunt[5:0], rx};
        if ({hunt[6:0], rx} == FLAG) begin rin <= 1'b1; rcnt <= '0; end
      end else begin
        rsr  <= {rsr[29:0], rx};
        rcnt <= rcnt + 6'd1;
        if (rcnt == 6'd31) begin
          rin <= 1'b0; hunt <= '0;
          fr_v <= 1'b1; fr <= {rsr, rx};
        end
      end
    end
  end

  // master FSM
  always_comb begin
    load = 1'b0;
    load_frame = {FLAG, 8'h01, 8'h00, seq, seq ^ 8'hA5};
    if (ms == M_TOKEN && tcnt == 0) load = 1'b1;
    if (ms == M_CMD && tcnt == 0) begin
      load = 1'b1;
      load_frame = {FLAG, p_read ? 8'h03 : 8'h02, p_addr, p_reg, p_data};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ms <= M_TOKEN; seq <= '0; wt <= '0; pend <= 1'b0; ring_ok <= 1'b0;
      token_good <= '0; token_bad <= '0; cmd_done <= 1'b0; cmd_ok <= 1'b0; rd_data <= '0;
      p_read <= 1'b0; p_addr <= '0; p_reg <= '0; p_data <= '0;
    end else begin
      cmd_done <= 1'b0;
      case (ms)
        M_TOKEN: if (load) begin ms <= M_TWAIT; wt <= '0; end
        M_TWAIT: begin
          wt <= wt + 1'b1;
          if (fr_v && fr[31:24] == 8'h01) begin
            if (fr == {8'h01, 8'h00, seq, seq ^ 8'hA5}) begin
              ring_ok <= 1'b1; token_good <= token_good + 16'd1;
              ms <= pend ? M_CMD : M_IDLE;
            end else begin
              ring_ok <= 1'b0; token_bad <= token_bad + 16'd1;
              ms <= M_IDLE;
              if (pend) begin pend <= 1'b0; cmd_done <= 1'b1; cmd_ok <= 1'b0; end
            end
            seq <= seq + 8'd1;
          end else if (wt == WTW'(TIMEOUT)) begin
            ring_ok <= 1'b0; token_bad <= token_bad + 16'd1; seq <= seq + 8'd1;
            ms <= M_IDLE;
            if (pend) begin pend <= 1'b0; cmd_done <= 1'b1; cmd_ok <= 1'b0; end
          end
        end
        M_IDLE: if (cmd_valid && !pend) begin
          pend <= 1'b1; p_read <= cmd_read; p_addr <= cmd_addr; p_reg <= cmd_reg; p_data <= cmd_data;
          ms <= M_TOKEN;
        end
        M_CMD: if (load) begin ms <= M_CWAIT; wt <= '0; end
        M_CWAIT: begin
          wt <= wt + 1'b1;
          if (fr_v && fr[31:24] == ({p_read ? 8'h03 : 8'h02} | 8'h80) && fr[23:16] == p_addr) begin
            cmd_done <= 1'b1; cmd_ok <= 1'b1; rd_data <= fr[7:0];
            pend <= 1'b0; ms <= M_IDLE;
          end else if (wt == WTW'(TIMEOUT)) begin
            cmd_done <= 1'b1; cmd_ok <= 1'b0; pend <= 1'b0; ring_ok <= 1'b0; ms <= M_IDLE;
          end
        end
        default: ms <= M_IDLE;
      endcase
    end
  end
endmodule
