// ntt_pkg: constants, types and table-generating functions shared by the
// Kyber NTT/INTT accelerator.
//
// The accelerator works on one polynomial of N = 256 coefficients modulo the
// Kyber prime Q = 3329, stored as 16-bit words. The forward transform is the
// Kyber negative-wrapped NTT (Cooley-Tukey butterflies, 7 layers, len = 128
// down to 2), the inverse is the matching Gentleman-Sande INTT (len = 2 up to
// 128). Two butterfly units work in parallel, so each layer of 128 butterflies
// takes 64 cycles.
//
// The functions below compute, at elaboration time, the contents of the
// twiddle ROM and of the address-sequence ROM, so no data file is needed:
//   zeta(k)       = 17^bitrev7(k) mod Q                (Kyber twiddle k)
//   NTT  entry k  = zeta(k) * 169^-1 mod Q             (cancels two K-RED x13)
//   INTT entry k  = -zeta(k) * 2^-1 * 169^-1 mod Q     (also folds the /2 of
//                                                       each inverse layer)
// Entries are stored centred in [-(Q-1)/2, (Q-1)/2] as signed 16-bit values.
package ntt_pkg;

  localparam int unsigned Q        = 3329;
  localparam longint unsigned QL   = 64'(Q);   // Q for 64-bit table arithmetic
  localparam int unsigned N        = 256;
  localparam int unsigned DW       = 16;   // coefficient word width
  localparam int unsigned AW       = 8;    // coefficient address width
  localparam int unsigned LAYERS   = 7;    // Kyber NTT layers (len 128..2)
  localparam int unsigned NBU      = 2;    // butterfly units
  localparam int unsigned CYC_PER_LAYER = N / 2 / NBU;            // 64
  localparam int unsigned BU_LATENCY    = 9;
  localparam int unsigned MUL_LATENCY   = 5;
  localparam int unsigned SEQ_IDX_W     = 9;                      // 448 max
  localparam int unsigned SEQ_AW        = SEQ_IDX_W + 2;          // {op, idx}
  localparam int unsigned TW_AW         = 8;                      // {inv, k}

  // Operations sequenced by the address generator.
  typedef enum logic [1:0] {
    OP_NTT    = 2'd0,
    OP_INTT   = 2'd1,
    OP_INPUT  = 2'd2,
    OP_OUTPUT = 2'd3
  } op_e;

  // One word of the address-sequence ROM: the coefficient addresses of the
  // butterfly of each unit (a = upper input, b = a + len) and its twiddle
  // index. For input and output only a1 is used (the coefficient index).
  typedef struct packed {
    logic [AW-1:0] a1;
    logic [AW-1:0] b1;
    logic [AW-1:0] a2;
    logic [AW-1:0] b2;
    logic [6:0]    k1;
    logic [6:0]    k2;
  } seq_entry_t;

  // Coefficient i is stored in RAM B when its address has odd parity, else in
  // RAM A. The two inputs of any butterfly differ in exactly one address bit,
  // so they always lie in different RAMs.
  function automatic logic bank_of(input logic [AW-1:0] addr);
    return ^addr;
  endfunction

  function automatic int unsigned bitrev7(input int unsigned k);
    int unsigned r = 0;
    for (int i = 0; i < 7; i++) r |= ((k >> i) & 1) << (6 - i);
    return r;
  endfunction

  function automatic int unsigned modpow(input int unsigned b, input int unsigned e);
    longint unsigned r = 1, x = 64'(b) % QL;
    int unsigned ee = e;
    while (ee != 0) begin
      if (ee[0]) r = (r * x) % QL;
      x = (x * x) % QL;
      ee = ee >> 1;
    end
    return int'(r);
  endfunction

  function automatic int unsigned zeta(input int unsigned k);
    return modpow(17, bitrev7(k));
  endfunction

  function automatic logic signed [DW-1:0] centre(input int unsigned v);
    return (v > (Q - 1) / 2) ? DW'(int'(v) - int'(Q)) : DW'(v);
  endfunction

  // Twiddle ROM word at address {inv, k}.
  function automatic logic signed [DW-1:0] twiddle_value(input int unsigned addr);
    int unsigned k      = addr % 128;
    int unsigned inv169 = modpow(169, Q - 2);
    int unsigned inv2   = (Q + 1) / 2;
    int unsigned v;
    if (addr < 128) v = 32'((64'(zeta(k)) * 64'(inv169)) % QL);
    else            v = 32'((((64'(Q - zeta(k)) * 64'(inv2)) % QL) * 64'(inv169)) % QL);
    return centre(v);
  endfunction

  // Address-sequence ROM word for operation op at step idx.
  function automatic seq_entry_t seq_value(input op_e op, input int unsigned idx);
    seq_entry_t  e = '0;
    int unsigned layer, cyc, len, bf, g, j, k, used;
    int unsigned aa[2], bb[2], kk[2];
    if (op == OP_NTT || op == OP_INTT) begin
      layer = idx / CYC_PER_LAYER;
      cyc   = idx % CYC_PER_LAYER;
      if (layer >= LAYERS) return e;
      len  = (op == OP_NTT) ? (128 >> layer) : (2 << layer);
      used = 0;  // INTT twiddles consumed by earlier layers
      for (int l = 0; l < int'(layer); l++) used += 128 / (2 << l);
      for (int u = 0; u < 2; u++) begin
        bf = 2 * cyc + u;
        g  = bf / len;
        j  = g * 2 * len + bf % len;
        k  = (op == OP_NTT) ? ((1 << layer) + g) : (127 - used - g);
        aa[u] = j;
        bb[u] = j + len;
        kk[u] = k;
      end
      e.a1 = AW'(aa[0]); e.b1 = AW'(bb[0]); e.k1 = 7'(kk[0]);
      e.a2 = AW'(aa[1]); e.b2 = AW'(bb[1]); e.k2 = 7'(kk[1]);
    end else if (idx < N) begin
      e.a1 = AW'(idx);
    end
    return e;
  endfunction

  // Number of steps of each operation.
  function automatic int unsigned op_steps(input op_e op);
    return (op == OP_NTT || op == OP_INTT) ? LAYERS * CYC_PER_LAYER : N;
  endfunction

endpackage
