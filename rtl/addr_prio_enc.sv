// addr_prio_enc: lowest-address priority encoder with a "any line active" flag.
//
// Resolves several active MATCH lines to the binary address of the
// lowest-numbered one, which is the arbitration rule of the string matcher
// (the CAM word with the lowest address wins). The encoder combines
// prioritisation and binary encoding in one structure and resolves the
// address most significant bit first: the MSB is 1 only when no line in the
// lower half of the address space is active, and each lower bit is decided
// only inside the half (quarter, ...) that the bits above it selected. The
// HIT output is the wired-OR of all lines (the CAM_HIT column of the row
// encoder). Purely combinational, no clock.
//
// Ports: match[N-1:0] active-high match lines; addr[$clog2(N)-1:0] the
// lowest active line (0 when none is active); hit = |match.
module addr_prio_enc #(
  parameter int unsigned N = 16,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  match,
  output logic [AW-1:0] addr,
  output logic          hit
);

  // Pad to a power of two so every halving step is exact.
  localparam int unsigned NP = 1 << AW;
  logic [NP-1:0] m;

  always_comb begin
    m = '0;
    m[N-1:0] = match;
  end

  always_comb begin
    int unsigned base;   // first line of the range chosen by the bits above
    int unsigned half;
    logic        lower_any;
    base = 0;
    addr = '0;
    for (int b = AW - 1; b >= 0; b--) begin
      half = 1 << b;
      lower_any = 1'b0;
      for (int unsigned i = 0; i < NP; i++) begin
        if (i >= base && i < base + half) lower_any |= m[i];
      end
      addr[b] = ~lower_any;
      if (!lower_any) base = base + half;
    end
    hit = |match;
    if (!hit) addr = '0;
  end

endmodule
