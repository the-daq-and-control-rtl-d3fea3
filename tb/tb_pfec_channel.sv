// Testbench for pfec_channel. The transmitted 10-bit characters are decoded
// with the testbench's own 8b/10b tables and checked against the expected
// command: K28.0, {hub,port}, byte count, the FIFO bytes, K28.4, then K28.5
// idle. A module model on the return line answers after a random delay with
// eight '1's and the echo of the hub/port byte. Cases: a good echo (done),
// a wrong echo (rx_err), no answer (timeout exactly TIMEOUT_BX BX after the
// end character), a zero-byte command, and data loaded while sending.
`include "tb_check.svh"
module tb_pfec_channel;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1;
  logic fifo_wr = 0, send = 0, rx_bit = 0;
  logic [7:0] fifo_data = 0;
  logic [4:0] hub = 0;
  logic [2:0] port = 0;
  logic [13:0] nbytes = 0;
  logic [9:0] tx;
  logic busy, done, timeout, rx_err;
  logic [14:0] fifo_level;
  pfec_channel #(.TX_BYTES(16384), .TIMEOUT_BX(100)) dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; `TB_END end

  localparam logic [5:0] T6[32] = '{6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001,
    6'b011001, 6'b111000, 6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100,
    6'b011100, 6'b010111, 6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010,
    6'b011010, 6'b111010, 6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110,
    6'b011110, 6'b101011};
  localparam logic [3:0] T4[8] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
  // returns {valid, k, byte}
  function automatic logic [9:0] dec(logic [9:0] w);
    logic [5:0] a; logic [3:0] b; int x = -1, y = -1;
    a = w[9:4]; b = w[3:0];
    if (a == 6'b001111 || a == 6'b110000) begin
      // K.28: 3b/4b of K28.y (RD- forms): 0100, 1001, 0101, 0011, 0010, 1010, 0110, 1000
      logic [3:0] k4[8] = '{4'b0100, 4'b1001, 4'b0101, 4'b0011, 4'b0010, 4'b1010, 4'b0110, 4'b1000};
      for (int i = 0; i < 8; i++) if (b == k4[i] || (b == ~k4[i] && ($countones(k4[i]) != 2 || i == 3))) y = i;
      if (a == 6'b110000) begin
        for (int i = 0; i < 8; i++) if (b == ~k4[i] && ($countones(k4[i]) != 2 || i == 3 || i == 0 || i == 4 || i == 7)) y = i;
        if (b == 4'b1010 || b == 4'b0110 || b == 4'b0101 || b == 4'b1001) y = -1;
        case (b) 4'b0101: y = 5; 4'b1010: y = 2; 4'b1001: y = 6; 4'b0110: y = 1; default: ; endcase
      end
      return (y < 0) ? 10'h0 : {1'b1, 1'b1, 3'(y), 5'd28};
    end
    for (int i = 0; i < 32; i++)
      if (a == T6[i] || (a == ~T6[i] && ($countones(T6[i]) != 3 || i == 7))) x = i;
    for (int i = 0; i < 8; i++)
      if (b == T4[i] || (b == ~T4[i] && ($countones(T4[i]) != 2 || i == 3))) y = i;
    if (b == 4'b0111 || b == 4'b1000) y = 7;
    return (x < 0 || y < 0) ? 10'h0 : {1'b1, 1'b0, 3'(y), 5'(x)};
  endfunction

  logic [9:0] chars[$];
  int bxn = 0, eof_bx = 0, to_bx = 0, n_eof = 0;
  always @(posedge clk) if (rst_n) begin
    bxn++;
    if (timeout) to_bx = bxn;
  end
  always @(negedge clk) if (rst_n) begin
    chars.push_back(dec(tx));
    if (dec(tx) == {2'b11, 8'h9C}) begin eof_bx = bxn; n_eof++; end
  end

  int n_done = 0, n_err = 0, n_to = 0;
  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    if (rx_err) n_err++;
    if (timeout) n_to++;
  end

  task automatic answer(logic [7:0] echo);
    // wait for the end character, then reply
    int e0;
    e0 = n_eof;
    while (n_eof == e0) @(negedge clk);
    repeat ($urandom_range(2, 60)) @(negedge clk);
    repeat (8) begin rx_bit = 1; @(negedge clk); end
    for (int i = 7; i >= 0; i--) begin rx_bit = echo[i]; @(negedge clk); end
    rx_bit = 0;
  endtask

  task automatic command(int n, int mode, int slow);
    logic [7:0] bytes[$];
    int s;
    hub = 5'($urandom); port = 3'($urandom); nbytes = 14'(n);
    for (int i = 0; i < n; i++) bytes.push_back(8'($urandom));
    if (!slow) foreach (bytes[i]) begin fifo_wr = 1; fifo_data = bytes[i]; @(negedge clk); end
    fifo_wr = 0;
    chars.delete();
    send = 1; @(negedge clk); send = 0;
    if (slow) foreach (bytes[i]) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      fifo_wr = 1; fifo_data = bytes[i]; @(negedge clk); fifo_wr = 0;
    end
    if (mode == 0) answer({hub, port});
    else if (mode == 1) answer(~{hub, port});
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    // check the character sequence
    s = 0;
    while (s < chars.size() && chars[s] == {2'b11, 8'hBC}) s++;
    `CHECK(chars[s] == {2'b11, 8'h1C}, $sformatf("start character %h", chars[s]))
    `CHECK(chars[s + 1] == {2'b10, hub, port}, "address byte")
    `CHECK(chars[s + 2] == {2'b10, 2'b00, nbytes[13:8]} && chars[s + 3] == {2'b10, nbytes[7:0]}, "byte count")
    s += 4;
    foreach (bytes[i]) begin
      while (chars[s] == {2'b11, 8'hBC}) s++;
      `CHECK(chars[s] == {2'b10, bytes[i]}, $sformatf("data byte %0d: %h expected %h", i, chars[s], bytes[i]))
      s++;
    end
    `CHECK(chars[s] == {2'b11, 8'h9C}, $sformatf("end character %h", chars[s]))
    for (int i = s + 1; i < chars.size(); i++) `CHECK(chars[i] == {2'b11, 8'hBC}, "idle after the command")
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    command(5, 0, 0);   `CHECK(n_done == 1, "done on a good echo")
    command(40, 0, 1);  `CHECK(n_done == 2, "done with slowly loaded data")
    command(0, 0, 0);   `CHECK(n_done == 3, "zero-byte command")
    command(3, 1, 0);   `CHECK(n_err == 1, "rx_err on a wrong echo")
    command(7, 2, 0);   `CHECK(n_to == 1, "timeout without answer")
    `CHECK(to_bx - eof_bx >= 100 && to_bx - eof_bx <= 103, $sformatf("timeout %0d BX after the end character", to_bx - eof_bx))
    command(300, 0, 0); `CHECK(n_done == 4, "300-byte command")
    `CHECK(fifo_level == 0, "FIFO drained")
    `TB_END
  end
endmodule
