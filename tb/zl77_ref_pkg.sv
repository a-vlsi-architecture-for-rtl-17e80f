// zl77_ref_pkg: reference model used by the testbenches.
//
// A plain software version of the engine's ZL77 variant: codewords of a
// 10-bit Index (address of the last matched character; lowest such address
// when several strings tie) and a 4-bit Length (1..15, 0 = raw character in
// the Index field), a circular history buffer of HIST characters appended
// at a wrapping pointer, matches searched over all start positions with the
// buffer treated as circular, and the codeword bit stream packed least
// significant bit first with zero padding at the end of each packet.
package zl77_ref_pkg;

  typedef logic [13:0] cw_t;   // {index[9:0], length[3:0]}

  class zl77_model;
    int unsigned hist_size;
    logic [7:0]  enc_hist[];
    logic [7:0]  dec_hist[];
    int unsigned enc_ptr, dec_ptr;
    // statistics of the last encode() call
    int n_raw, n_match, n_max, n_wrap;

    function new(int unsigned n);
      hist_size = n;
      enc_hist = new[n];
      dec_hist = new[n];
      foreach (enc_hist[i]) begin enc_hist[i] = 8'h00; dec_hist[i] = 8'h00; end
      enc_ptr = 0;
      dec_ptr = 0;
    endfunction

    // Encodes one packet and appends its codewords to cws.
    function void encode(input logic [7:0] data[$], ref cw_t cws[$]);
      int pos;
      pos = 0;
      n_raw = 0; n_match = 0; n_max = 0; n_wrap = 0;
      while (pos < data.size()) begin
        int lmax, idx, limit;
        limit = data.size() - pos;
        if (limit > 15) limit = 15;
        lmax = 0;
        for (int p = 0; p < hist_size; p++) begin
          int l;
          l = 0;
          while (l < limit && enc_hist[(p + l) % hist_size] == data[pos + l]) l++;
          if (l > lmax) lmax = l;
        end
        if (lmax == 0) begin
          cws.push_back({2'b00, data[pos], 4'h0});
          enc_hist[enc_ptr] = data[pos];
          enc_ptr = (enc_ptr + 1) % hist_size;
          pos++;
          n_raw++;
        end else begin
          idx = hist_size;
          for (int p = 0; p < hist_size; p++) begin
            int l;
            l = 0;
            while (l < lmax && enc_hist[(p + l) % hist_size] == data[pos + l]) l++;
            if (l == lmax && (p + lmax - 1) % hist_size < idx) idx = (p + lmax - 1) % hist_size;
          end
          if (idx - lmax + 1 < 0) n_wrap++;
          cws.push_back({10'(idx), 4'(lmax)});
          for (int k = 0; k < lmax; k++) begin
            enc_hist[enc_ptr] = data[pos + k];
            enc_ptr = (enc_ptr + 1) % hist_size;
          end
          pos += lmax;
          n_match++;
          if (lmax == 15) n_max++;
        end
      end
    endfunction

    // Decodes codewords (reads the whole match, then appends it).
    function void decode(input cw_t cws[$], ref logic [7:0] out[$]);
      foreach (cws[i]) begin
        int len, start;
        logic [7:0] tmp[$];
        len = cws[i][3:0];
        tmp = {};
        if (len == 0) tmp.push_back(cws[i][11:4]);
        else begin
          start = (int'(cws[i][13:4]) - len + 1 + hist_size) % hist_size;
          for (int k = 0; k < len; k++) tmp.push_back(dec_hist[(start + k) % hist_size]);
        end
        foreach (tmp[k]) begin
          out.push_back(tmp[k]);
          dec_hist[dec_ptr] = tmp[k];
          dec_ptr = (dec_ptr + 1) % hist_size;
        end
      end
    endfunction
  endclass

  // Packs codewords into bytes, LSB first, zero padded.
  function automatic void pack(input cw_t cws[$], ref logic [7:0] bytes[$]);
    bit bits[$];
    foreach (cws[i]) for (int b = 0; b < 14; b++) bits.push_back(cws[i][b]);
    while (bits.size() % 8 != 0) bits.push_back(1'b0);
    for (int i = 0; i < bits.size(); i += 8) begin
      logic [7:0] by;
      for (int b = 0; b < 8; b++) by[b] = bits[i + b];
      bytes.push_back(by);
    end
  endfunction

  // Test data: words from a small vocabulary, runs and random bytes.
  function automatic void make_packet(input int len, ref logic [7:0] data[$]);
    string words[8] = '{"the ", "data ", "compression ", "engine ", "string ", "match ", "of ", "a "};
    data = {};
    while (data.size() < len) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind < 7) begin
        string w;
        w = words[$urandom_range(0, 7)];
        for (int i = 0; i < w.len() && data.size() < len; i++) data.push_back(w[i]);
      end else if (kind == 7) begin
        logic [7:0] c;
        c = 8'h41 + 8'($urandom_range(0, 3));
        repeat ($urandom_range(10, 40)) if (data.size() < len) data.push_back(c);
      end else begin
        repeat ($urandom_range(1, 4)) if (data.size() < len) data.push_back(8'($urandom));
      end
    end
  endfunction

endpackage
