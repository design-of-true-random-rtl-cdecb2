// trng_pkg: constants, types and helper functions shared by the tunable
// beat-frequency-detection (BFD) TRNG.
//
// The two clock generators A and B are Xilinx-style DCMs whose output
// frequency is F_in * M / D. A tuning set is a pair of (M, D) settings, one
// per DCM, chosen so that the period ratio T_A / T_B = N / (N + 1), with
// 2 <= M <= 33, 1 <= D <= 32 and 400 <= N <= 1000 (the document's range
// rule). Then DCM-A gains exactly one cycle on DCM-B every N cycles of B and
// the beat counter peaks near n = N / 2, i.e. between 200 and 500.
//
// Stored-word layout (this design's choice; the document gives only the word
// width, 16 bits, and the memory size, 23 words = 46 bytes):
//   [15]    unused, 0
//   [14:10] M_A - 2
//   [9:5]   D_A - 1
//   [4:0]   M_B - 2
// D_B is not stored: it follows from D_A * M_B + 1 = D_B * M_A, which is how
// the (N, N+1) relation is met, and the DRP controller recomputes it.
//
// The table content is computed by md_table(): every (M_A, D_A, M_B) in
// lexical order for which N = D_A * M_B lies in [N_MIN, N_MAX] and
// (N + 1) / M_A is a whole number in [D_MIN, D_MAX] is a solution; the first
// NUM_SETS solutions are kept. The document states that 23 combinations meet
// its rule but does not list them; this fixed enumeration order is this
// design's choice.
package trng_pkg;

  localparam int unsigned M_MIN    = 2;
  localparam int unsigned M_MAX    = 33;
  localparam int unsigned D_MIN    = 1;
  localparam int unsigned D_MAX    = 32;
  localparam int unsigned N_MIN    = 400;
  localparam int unsigned N_MAX    = 1000;
  localparam int unsigned NUM_SETS = 23;   // permitted (M,D) combinations
  localparam int unsigned ADDR_W   = 5;    // BRAM address width
  localparam int unsigned WORD_W   = 16;   // BRAM word width

  // Xilinx DCM_ADV dynamic reconfiguration port: the M/D register.
  // Write data layout {M-1[7:0], D-1[7:0]}.
  localparam logic [6:0] DRP_MD_ADDR = 7'h50;

  // One tuning set, values as used by the DCM (not offset-encoded).
  typedef struct packed {
    logic [5:0] m_a;
    logic [5:0] d_a;
    logic [5:0] m_b;
    logic [5:0] d_b;
  } md_set_t;

  // Dynamic reconfiguration port, master to DCM.
  typedef struct packed {
    logic        den;    // enable, one cycle per access
    logic        dwe;    // write enable, qualified by den
    logic [6:0]  daddr;  // register address
    logic [15:0] di;     // write data
  } drp_req_t;

  // Dynamic reconfiguration port, DCM to master.
  typedef struct packed {
    logic        drdy;   // access complete, one cycle
    logic [15:0] dout;   // read data
  } drp_rsp_t;

  function automatic logic [WORD_W-1:0] md_pack(int unsigned m_a, int unsigned d_a,
                                                int unsigned m_b);
    logic [4:0] fm_a, fd_a, fm_b;
    fm_a = 5'(m_a - M_MIN);
    fd_a = 5'(d_a - D_MIN);
    fm_b = 5'(m_b - M_MIN);
    return {1'b0, fm_a, fd_a, fm_b};
  endfunction

  // Word for DCM DRP register 0x50 from an M and a D value.
  function automatic logic [15:0] drp_md_word(logic [5:0] m, logic [5:0] d);
    logic [7:0] mm1, dm1;
    mm1 = 8'(m) - 8'd1;
    dm1 = 8'(d) - 8'd1;
    return {mm1, dm1};
  endfunction

  // Whole table, entry i in bits [16*i +: 16]; entries past the last
  // solution found stay zero.
  function automatic logic [NUM_SETS*WORD_W-1:0] md_table();
    logic [NUM_SETS*WORD_W-1:0] t;
    int unsigned k;
    int unsigned n;
    int unsigned db;
    t = '0;
    k = 0;
    for (int unsigned ma = M_MIN; ma <= M_MAX; ma++) begin
      for (int unsigned da = D_MIN; da <= D_MAX; da++) begin
        for (int unsigned mb = M_MIN; mb <= M_MAX; mb++) begin
          n  = da * mb;
          db = (n + 1) / ma;
          if (k < NUM_SETS && n >= N_MIN && n <= N_MAX && (n + 1) % ma == 0 &&
              db >= D_MIN && db <= D_MAX) begin
            t[k*WORD_W +: WORD_W] = md_pack(ma, da, mb);
            k++;
          end
        end
      end
    end
    return t;
  endfunction

endpackage
