// dcm_adv_model: behavioural model (not synthesizable) of a Xilinx-style
// digital clock manager used as the frequency synthesizer of the TRNG.
//
// CLKFX runs at F_CLKIN * M / D. Edge times are computed in femtoseconds
// from an ideal time line and rounded to the 1 ps simulation step, so the
// average period is exact and the rounding acts only as a small extra
// jitter; each edge is further moved by a uniform random jitter of up to
// +/-JITTER_PS. While RST is high CLKFX is low and LOCKED is low; after RST
// falls the model waits LOCK_CYCLES cycles of CLKIN, raises LOCKED and
// starts CLKFX with the M and D then current.
//
// Dynamic reconfiguration port: a DEN strobe on a DCLK edge starts an access,
// answered by a one-cycle DRDY DRDY_LAT cycles later. A write (DWE) to
// address 0x50 loads M = DI[15:8] + 1 and D = DI[7:0] + 1; reads of 0x50
// return the same layout, other addresses read 0. Writes while RST is low
// and values outside 2 <= M <= 33, 1 <= D <= 32 are reported as errors and
// counted in bad_accesses. The CLKIN period is a parameter rather than
// measured. Time unit and precision: 1 ps.
module dcm_adv_model #(
  parameter int unsigned CLKIN_PERIOD_PS = 10000,
  parameter int unsigned M_INIT          = 2,
  parameter int unsigned D_INIT          = 1,
  parameter int unsigned JITTER_PS       = 10,
  parameter int unsigned LOCK_CYCLES     = 20,
  parameter int unsigned DRDY_LAT        = 3
) (
  input  logic        CLKIN,
  input  logic        RST,
  input  logic        DCLK,
  input  logic [6:0]  DADDR,
  input  logic [15:0] DI,
  input  logic        DWE,
  input  logic        DEN,
  output logic [15:0] DO,
  output logic        DRDY,
  output logic        CLKFX,
  output logic        LOCKED
);

  timeunit 1ps;
  timeprecision 1ps;

  int unsigned m_val = M_INIT;
  int unsigned d_val = D_INIT;
  int unsigned writes = 0;        // accepted writes to the M/D register
  int unsigned bad_accesses = 0;  // rule violations seen on the DRP port
  logic        locked_int = 1'b0;

  assign LOCKED = locked_int && !RST;

  // clock synthesis
  initial begin
    longint t_fs;       // ideal time of the next edge
    longint half_fs;    // ideal half period
    longint jit_fs;
    longint target_ps;
    CLKFX = 1'b0;
    forever begin
      wait (!RST);
      repeat (LOCK_CYCLES) @(posedge CLKIN);
      if (!RST) begin
        half_fs    = (longint'(CLKIN_PERIOD_PS) * 1000 * longint'(d_val)) /
                     (2 * longint'(m_val));
        t_fs       = longint'($time) * 1000;
        locked_int = 1'b1;
        while (!RST) begin
          t_fs      = t_fs + half_fs;
          jit_fs    = longint'($urandom_range(2 * JITTER_PS * 1000)) -
                      longint'(JITTER_PS) * 1000;
          target_ps = (t_fs + jit_fs + 500) / 1000;
          if (target_ps > longint'($time)) #(target_ps - longint'($time));
          CLKFX = !CLKFX;
        end
      end
      locked_int = 1'b0;
      CLKFX      = 1'b0;
    end
  end

  // dynamic reconfiguration port
  initial begin
    DRDY = 1'b0;
    DO   = '0;
    forever begin
      @(posedge DCLK);
      DRDY = 1'b0;
      if (DEN) begin
        if (DWE) begin
          if (!RST) begin
            $error("dcm_adv_model: DRP write while the DCM is running");
            bad_accesses++;
          end
          if (DADDR == 7'h50) begin
            if (int'(DI[15:8]) + 1 < 2 || int'(DI[15:8]) + 1 > 33 || int'(DI[7:0]) + 1 > 32) begin
              $error("dcm_adv_model: M/D out of range");
              bad_accesses++;
            end else begin
              m_val = int'(DI[15:8]) + 1;
              d_val = int'(DI[7:0]) + 1;
              writes++;
            end
          end
        end
        repeat (DRDY_LAT) @(posedge DCLK);
        DO   = (DADDR == 7'h50) ? {8'(m_val - 1), 8'(d_val - 1)} : '0;
        DRDY = 1'b1;
      end
    end
  end

endmodule
