// drp_ctrl: DCM dynamic-reconfiguration controller of the tuning circuitry.
//
// On a request (req) it reads the selected word from the tuning memory,
// rebuilds the full (M, D) pair of both DCMs, checks it against the range
// rule, and rewrites the M/D register of DCM-A and then DCM-B through their
// DRP ports. The document specifies this block's place (memory -> controller
// -> both DCM DRP ports, started by a DRP request) and that it follows the
// standard vendor procedure; the sequence below is that procedure as this
// design implements it:
//   1. READ   present the address to the memory (synchronous read),
//   2. LOAD   unpack M_A, D_A, M_B from the word,
//   3. DIV    compute D_B = (D_A*M_B + 1) / M_A by 11-step restoring division,
//   4. CHECK  refuse the set (err strobe, no DCM touched) unless the division
//             is exact, D_B is in 1..32 and N = D_A*M_B is in 400..1000,
//   5. hold both DCMs in reset (dcm_rst), write register 0x50 of DCM-A with
//      {M-1, D-1} and wait for its DRDY, then the same for DCM-B,
//   6. release reset and wait until both DCMs report LOCKED, then pulse done.
// A request while busy is ignored. The set last applied is on cur_set.
//
// Interface: clk (DRP clock), rst_n (asynchronous, active low), req,
// addr_in (from addr_gen), rom_addr / rom_data (to md_rom, 1-cycle read),
// drp_a / drp_b (request structs) with rsp_a / rsp_b (responses),
// dcm_rst (to both DCMs), locked_a / locked_b, busy, done, err (strobes).
module drp_ctrl
  import trng_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic [ADDR_W-1:0] addr_in,
  output logic [ADDR_W-1:0] rom_addr,
  input  logic [WORD_W-1:0] rom_data,
  output drp_req_t          drp_a,
  input  drp_rsp_t          rsp_a,
  output drp_req_t          drp_b,
  input  drp_rsp_t          rsp_b,
  output logic              dcm_rst,
  input  logic              locked_a,
  input  logic              locked_b,
  output logic              busy,
  output logic              done,
  output logic              err,
  output md_set_t           cur_set
);

  typedef enum logic [3:0] {
    S_IDLE, S_READ, S_LOAD, S_DIV, S_CHECK, S_WR_A, S_WAIT_A, S_WR_B, S_WAIT_B,
    S_LOCK
  } state_t;

  localparam int unsigned DVD_W = 11;  // D_A*M_B + 1 <= 32*33 + 1 < 2048

  state_t           state;
  md_set_t          set;       // set being applied
  logic [DVD_W-1:0] dvd;       // dividend, shifted out MSB first; holds quotient
  logic [6:0]       rem;       // partial remainder
  logic [3:0]       step;      // division steps left
  logic [10:0]      n_val;     // N = D_A * M_B
  logic [7:0]       rem_sh;    // remainder with next dividend bit
  logic             ok;
  logic [5:0]       ld_m_a, ld_d_a, ld_m_b;  // fields of the memory word
  logic [10:0]      ld_n;

  // rom_data[15] is an unused spare bit of the stored word
  assign ld_m_a = {1'b0, rom_data[14:10]} + 6'(M_MIN);
  assign ld_d_a = {1'b0, rom_data[9:5]}   + 6'(D_MIN);
  assign ld_m_b = {1'b0, rom_data[4:0]}   + 6'(M_MIN);
  assign ld_n   = {5'b0, ld_d_a} * {5'b0, ld_m_b};

  assign rem_sh = {rem, dvd[DVD_W-1]};
  assign ok     = (rem == '0) && (32'(dvd) >= D_MIN) && (32'(dvd) <= D_MAX) &&
                  (32'(n_val) >= N_MIN) && (32'(n_val) <= N_MAX);
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rom_addr <= '0;
      set      <= '0;
      cur_set  <= '0;
      dvd      <= '0;
      rem      <= '0;
      step     <= '0;
      n_val    <= '0;
      drp_a    <= '0;
      drp_b    <= '0;
      dcm_rst  <= 1'b0;
      done     <= 1'b0;
      err      <= 1'b0;
    end else begin
      done  <= 1'b0;
      err   <= 1'b0;
      drp_a <= '0;
      drp_b <= '0;
      unique case (state)
        S_IDLE: if (req) begin
          rom_addr <= addr_in;
          state    <= S_READ;
        end
        S_READ: state <= S_LOAD;  // memory output registers this cycle
        S_LOAD: begin
          set.m_a <= ld_m_a;
          set.d_a <= ld_d_a;
          set.m_b <= ld_m_b;
          set.d_b <= '0;
          n_val   <= ld_n;
          dvd     <= ld_n + 11'd1;
          rem     <= '0;
          step    <= 4'(DVD_W);
          state   <= S_DIV;
        end
        S_DIV: begin
          if (rem_sh >= {2'b00, set.m_a}) begin
            rem <= 7'(rem_sh - {2'b00, set.m_a});
            dvd <= {dvd[DVD_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh[6:0];
            dvd <= {dvd[DVD_W-2:0], 1'b0};
          end
          step <= step - 1'b1;
          if (step == 4'd1) state <= S_CHECK;
        end
        S_CHECK: begin
          if (ok && set.m_a != '0) begin
            set.d_b <= dvd[5:0];
            dcm_rst <= 1'b1;
            state   <= S_WR_A;
          end else begin
            err   <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_WR_A: begin
          drp_a <= '{den: 1'b1, dwe: 1'b1, daddr: DRP_MD_ADDR,
                     di: drp_md_word(set.m_a, set.d_a)};
          state <= S_WAIT_A;
        end
        S_WAIT_A: if (rsp_a.drdy) state <= S_WR_B;
        S_WR_B: begin
          drp_b <= '{den: 1'b1, dwe: 1'b1, daddr: DRP_MD_ADDR,
                     di: drp_md_word(set.m_b, set.d_b)};
          state <= S_WAIT_B;
        end
        S_WAIT_B: if (rsp_b.drdy) begin
          dcm_rst <= 1'b0;
          state   <= S_LOCK;
        end
        S_LOCK: if (locked_a && locked_b) begin
          cur_set <= set;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DRP rule: an access is a single-cycle DEN, and DEN is never raised
  // again before the DCM has answered with DRDY.
  a_den_a_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                  drp_a.den |=> !drp_a.den);
  a_den_b_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                  drp_b.den |=> !drp_b.den);
  a_wr_in_reset: assert property (@(posedge clk) disable iff (!rst_n)
                                  (drp_a.den || drp_b.den) |-> dcm_rst);

endmodule
