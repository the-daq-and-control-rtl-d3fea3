// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: the FDDI 4b/5b table, NRZI coding, and builders
// for TBM core data streams (header, ROC headers, hits, trailer) as nibble
// queues, and the TTC short broadcast frame.
package tb_ref_pkg;
  typedef logic [3:0] nib_q_t[$];

  function automatic logic [4:0] ref_5b(input logic [3:0] n);
    logic [4:0] t[16] = '{5'h1E, 5'h09, 5'h14, 5'h15, 5'h0A, 5'h0B, 5'h0E, 5'h0F,
                          5'h12, 5'h13, 5'h16, 5'h17, 5'h1A, 5'h1B, 5'h1C, 5'h1D};
    return t[n];
  endfunction

  // returns -1 for idle A, -2 for idle B, -3 for invalid, else the nibble
  function automatic int ref_4b(input logic [4:0] s);
    if (s == 5'b11111) return -1;
    if (s == 5'b11000) return -2;
    for (int i = 0; i < 16; i++) if (ref_5b(4'(i)) == s) return i;
    return -3;
  endfunction

  function automatic void push12(ref nib_q_t q, input logic [11:0] v);
    q.push_back(v[11:8]); q.push_back(v[7:4]); q.push_back(v[3:0]);
  endfunction

  function automatic logic [23:0] ref_hit(input int dcol, input int pxl, input int adc);
    logic [5:0] d = 6'(dcol);
    logic [8:0] p = 9'(pxl);
    logic [7:0] a = 8'(adc);
    return {d, p, a[7:4], 1'b0, a[3:0]};
  endfunction

  function automatic void push_hit(ref nib_q_t q, input logic [23:0] h);
    for (int i = 5; i >= 0; i--) q.push_back(h[4*i +: 4]);
  endfunction

  // a full TBM core packet; hits of ROC r (1-based), hit k:
  // dcol = (r+k) mod 26, pixel = (ev+3k) mod 160, adc = ev ^ {r[3:0],k[3:0]}
  function automatic void push_packet(ref nib_q_t q, input int ev, input int hdr_field,
                                      input int n_rocs, input int hits, input int status);
    push12(q, 12'h7FC);
    q.push_back(4'(ev >> 4)); q.push_back(4'(ev));
    q.push_back(4'(hdr_field >> 4)); q.push_back(4'(hdr_field));
    for (int r = 1; r <= n_rocs; r++) begin
      push12(q, 12'h7F8);
      for (int k = 0; k < hits; k++)
        push_hit(q, ref_hit((r + k) % 26, (ev + 3 * k) % 160, (ev & 255) ^ (((r & 15) << 4) | (k & 15))));
    end
    push12(q, 12'h7FE);
    for (int i = 3; i >= 0; i--) q.push_back(4'(status >> (4 * i)));
  endfunction

  // TTC short broadcast frame, first bit in [15]: start, format, command,
  // Hamming check bits, stop
  function automatic logic [15:0] ttc_frame(input logic [7:0] x);
    logic [4:0] h;
    h[0] = x[0] ^ x[1] ^ x[2] ^ x[3];
    h[1] = x[0] ^ x[4] ^ x[5] ^ x[6];
    h[2] = x[1] ^ x[2] ^ x[4] ^ x[5] ^ x[7];
    h[3] = x[1] ^ x[3] ^ x[4] ^ x[6] ^ x[7];
    h[4] = ^{x, h[3:0]};
    return {2'b00, x, h, 1'b1};
  endfunction
endpackage
