// dvs_pkg: types and constants shared by the dynamic voltage scaling (DVS)
// controller blocks.
//
// Voltages are carried as unsigned codes with a 10 mV step, so code 100 is
// 1.0 V and code 150 is 1.5 V. The 1.0 V temperature-insensitive calibration
// voltage and the 1.5 V maximum supply are the values of the characterized
// 0.13 um process this architecture was developed for; the code width and
// the 10 mV step are this design's own choice. Frequencies are carried as
// oscillator cycle counts per measurement window (see freq_counter).
package dvs_pkg;

  localparam logic [7:0] V_TI_DEFAULT  = 8'd100; // 1.0 V calibration point
  localparam logic [7:0] V_MAX_DEFAULT = 8'd150; // 1.5 V worst-case supply

  // Operating mode requested by the performance manager ("Mode" in the
  // block diagram).
  typedef enum logic [1:0] {
    MODE_RUN   = 2'd0,   // normal operation: LUT setting then monitoring
    MODE_CAL   = 2'd1,   // run process calibration
    MODE_PANIC = 2'd2    // raise the supply to the split's peak voltage now
  } mode_e;

  // Controller state, exported for observation.
  typedef enum logic [2:0] {
    ST_IDLE      = 3'd0,  // waiting for a calibration request
    ST_CAL_RAMP  = 3'd1,  // ramping to the temperature-insensitive voltage
    ST_CAL_MEAS  = 3'd2,  // process identifier measuring the ring oscillator
    ST_LUT       = 3'd3,  // LUT mode: ramping to the LUT voltage
    ST_MONITOR   = 3'd4,  // performance-monitoring mode
    ST_MON_WAIT  = 3'd5,  // monitoring step issued, waiting for the regulator
    ST_PANIC     = 3'd6   // panic: ramping to the split's peak voltage
  } ctrl_state_e;

  // Register map of the performance-manager bus (word addresses).
  localparam int unsigned ADDR_W = 16;
  localparam logic [ADDR_W-1:0] REG_FTARGET  = 16'h0000; // target frequency count (rw)
  localparam logic [ADDR_W-1:0] REG_MODE     = 16'h0001; // mode request, mode_e (w)
  localparam logic [ADDR_W-1:0] REG_STATUS   = 16'h0002; // state, split, calibrated (r)
  localparam logic [ADDR_W-1:0] REG_VTARGET  = 16'h0003; // present V_target code (r)
  localparam logic [ADDR_W-1:0] REG_ROCOUNT  = 16'h0004; // last RO count (r)
  localparam logic [ADDR_W-1:0] REG_LUTROW   = 16'h0005; // selected LUT row (r)
  localparam logic [ADDR_W-1:0] REG_RO_BASE  = 16'h0100; // RO LUT entry s at +s (w)
  localparam logic [ADDR_W-1:0] REG_LUTF_BASE = 16'h0200; // LUT frequency of row r at +r (w)
  localparam logic [ADDR_W-1:0] REG_LUTV_BASE = 16'h1000; // LUT voltage at +r*64+s (w)

endpackage
