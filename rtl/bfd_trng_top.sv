// bfd_trng_top: tunable beat-frequency-detection true random number generator.
//
// Two DCM clock generators (outside this module) run at slightly different
// frequencies, F_in*M_A/D_A and F_in*M_B/D_B, with T_A/T_B = N/(N+1). The
// random-number path runs on clock B:
//   bfd_sampler   samples clock A on each edge of clock B (beat phase q),
//   beat_counter  counts B cycles while q is low; its peak before q rises
//                 (about N/2, varied by clock jitter) is the random number,
//   vnc           Von Neumann corrects the 3 LSBs of each random number.
// The tuning path runs on the DRP clock clk:
//   addr_gen      holds the 5-bit index of the chosen (M, D) set,
//   md_rom        23 x 16-bit table of the permitted sets,
//   drp_ctrl      on drp_req rewrites both DCMs' M and D through their DRP
//                 ports, holding them in reset meanwhile.
// This structure follows the document's two block diagrams. Own choices:
// en holds both DCMs in reset when low; the clock-B logic is held in reset
// (through a synchronizer) whenever rst_n is low or either DCM is unlocked,
// so every reconfiguration restarts the counter cleanly.
//
// Interface: clk / rst_n (DRP clock and reset), en, sel_valid / sel (set
// index), drp_req; from the DCMs clk_a, clk_b, locked_a, locked_b, rsp_a,
// rsp_b; to them drp_a, drp_b, dcm_rst_a, dcm_rst_b. Outputs: rnd_number /
// rnd_valid / rnd_sat (raw peak counts, clk_b domain), vnc_valid / vnc_bits
// (corrected bits, clk_b domain), and the tuning status sel_err,
// tune_busy, tune_done, tune_err, cur_set (clk domain).
module bfd_trng_top
  import trng_pkg::*;
#(
  parameter int unsigned CNT_W     = 9,
  parameter int unsigned VNC_LANES = 3,
  parameter int unsigned FF_STAGES = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 sel_valid,
  input  logic [ADDR_W-1:0]    sel,
  input  logic                 drp_req,
  // DCM side
  input  logic                 clk_a,
  input  logic                 clk_b,
  input  logic                 locked_a,
  input  logic                 locked_b,
  input  drp_rsp_t             rsp_a,
  input  drp_rsp_t             rsp_b,
  output drp_req_t             drp_a,
  output drp_req_t             drp_b,
  output logic                 dcm_rst_a,
  output logic                 dcm_rst_b,
  // random outputs (clk_b domain)
  output logic [CNT_W-1:0]     rnd_number,
  output logic                 rnd_valid,
  output logic                 rnd_sat,
  output logic [VNC_LANES-1:0] vnc_valid,
  output logic [VNC_LANES-1:0] vnc_bits,
  // tuning status (clk domain)
  output logic                 sel_err,
  output logic                 tune_busy,
  output logic                 tune_done,
  output logic                 tune_err,
  output md_set_t              cur_set
);

  // ---------------- tuning path ----------------
  logic [ADDR_W-1:0] addr, rom_addr;
  logic [WORD_W-1:0] rom_data;
  logic              dcm_rst;

  addr_gen u_addr_gen (
    .clk, .rst_n, .sel_valid, .sel, .addr, .sel_err
  );

  md_rom u_md_rom (
    .clk, .addr(rom_addr), .data(rom_data)
  );

  drp_ctrl u_drp_ctrl (
    .clk, .rst_n, .req(drp_req), .addr_in(addr), .rom_addr, .rom_data,
    .drp_a, .rsp_a, .drp_b, .rsp_b, .dcm_rst, .locked_a, .locked_b,
    .busy(tune_busy), .done(tune_done), .err(tune_err), .cur_set
  );

  assign dcm_rst_a = dcm_rst || !en;
  assign dcm_rst_b = dcm_rst || !en;

  // ---------------- random-number path (clock B) ----------------
  logic             rst_b_n;
  logic             q;
  logic [CNT_W-1:0] count;

  rst_sync u_rst_b (
    .clk(clk_b), .arst_n(rst_n && locked_a && locked_b), .rst_n(rst_b_n)
  );

  bfd_sampler #(.STAGES(FF_STAGES)) u_sampler (
    .clk_b, .rst_n(rst_b_n), .d_a(clk_a), .q
  );

  beat_counter #(.CNT_W(CNT_W)) u_counter (
    .clk_b, .rst_n(rst_b_n), .q, .count, .count_max(rnd_number),
    .count_valid(rnd_valid), .count_sat(rnd_sat)
  );

  vnc #(.LANES(VNC_LANES)) u_vnc (
    .clk(clk_b), .rst_n(rst_b_n), .in_valid(rnd_valid),
    .in_bits(rnd_number[VNC_LANES-1:0]), .out_valid(vnc_valid),
    .out_bits(vnc_bits)
  );

endmodule
