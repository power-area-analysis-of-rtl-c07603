// Testbench helpers: build the reduced Virtex-4 style packet streams that
// the ICAP model understands (see icap_model.sv).
//
// A partial bitstream is: one dummy word, the sync word, a FAR write, an
// FDRI write of `frames` x 41 words (type-1 header with count 0 followed by
// a type-2 header carrying the count), NOOP padding up to `total_words`, and
// a CMD write of DESYNC. The first frame word is the module's signature; the
// rest are frame_word() values, so any word can be predicted for readback.
package pdr_tb_pkg;
  localparam int unsigned FRAME_WORDS = 41;
  localparam logic [31:0] SIG_MUL = 32'h4D55_4C00;
  localparam logic [31:0] SIG_DIV = 32'h4449_5600;
  localparam logic [31:0] SYNC    = 32'hAA99_5566;
  localparam logic [31:0] NOOP    = 32'h2000_0000;
  localparam logic [4:0]  R_FAR = 5'd1, R_FDRI = 5'd2, R_FDRO = 5'd3, R_CMD = 5'd4, R_IDCODE = 5'd12;

  function automatic logic [31:0] t1(bit rd, logic [4:0] r, int cnt);
    return {3'b001, rd ? 2'b01 : 2'b10, 9'h0, r, 2'b00, 11'(cnt)};
  endfunction
  function automatic logic [31:0] t2(bit rd, int cnt);
    return {3'b010, rd ? 2'b01 : 2'b10, 27'(cnt)};
  endfunction

  // deterministic frame contents: word k of a module with signature sig
  function automatic logic [31:0] frame_word(logic [31:0] sig, int k);
    if (k == 0) return sig;
    if (sig == 32'h0) return 32'h0;
    return sig ^ (32'(k) * 32'h9E37_79B1) ^ 32'(k);
  endfunction

  function automatic void build_partial(ref logic [31:0] q[$], input logic [31:0] sig,
                                        input int frames, input int total_words);
    int n;
    n = frames * FRAME_WORDS;
    q.delete();
    q.push_back(32'hFFFF_FFFF);
    q.push_back(SYNC);
    q.push_back(t1(0, R_FAR, 1));
    q.push_back(32'h0);
    q.push_back(t1(0, R_FDRI, 0));
    q.push_back(t2(0, n));
    for (int k = 0; k < n; k++) q.push_back(frame_word(sig, k));
    while (q.size() < total_words - 2) q.push_back(NOOP);
    q.push_back(t1(0, R_CMD, 1));
    q.push_back(32'h0000_000D);
  endfunction

  // command stream that prepares a readback of n words from frame `far`
  function automatic void build_readback_cmd(ref logic [31:0] q[$], input int far, input int n);
    q.delete();
    q.push_back(32'hFFFF_FFFF);
    q.push_back(SYNC);
    q.push_back(t1(0, R_FAR, 1));
    q.push_back(32'(far));
    q.push_back(t1(1, R_FDRO, n));
  endfunction

  // command stream that prepares a read of one configuration register
  function automatic void build_reg_read(ref logic [31:0] q[$], input logic [4:0] r);
    q.delete();
    q.push_back(32'hFFFF_FFFF);
    q.push_back(SYNC);
    q.push_back(t1(1, r, 1));
  endfunction

  function automatic void build_desync(ref logic [31:0] q[$]);
    q.delete();
    q.push_back(t1(0, R_CMD, 1));
    q.push_back(32'h0000_000D);
  endfunction
endpackage
