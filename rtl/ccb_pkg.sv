// ccb_pkg - shared types and constants of the CCB backend FPGA.
//
// The CCB integrates the outputs of 16 A/D converters (2 detectors x 4
// bands x 2 radiometers) separately for each of the 4 combinations of two
// phase switches, A and B, giving 64 integrated values per integration.
// This package holds the working-register structs that the scan controller
// copies from the host-visible registers, the control-register bit layout,
// the register defaults and the word addresses of the register bus.
//
// The sizes, defaults, ranges and control bit positions follow the
// register tables of the interface specification. The register word
// addresses, the widths of the narrow fields and the DMA area layout are
// this design's own choices.
package ccb_pkg;

  localparam int N_ADC    = 16;               // A/D converters
  localparam int N_STATES = 4;                // phase-switch states {B,A}
  localparam int N_VALUES = N_ADC * N_STATES; // integrated values per integration
  localparam int N_STAGES = 32;               // phase-switch state-machine stages

  // Per-scan configuration (copied into working registers at scan start).
  typedef struct packed {
    logic [15:0] sample_interval;   // 0.1 us units, 1..65535
    logic [5:0]  samples_per_cycle; // 1..32
    logic [31:0] ps_a;              // phase switch A state per stage (bit 0 first)
    logic [31:0] ps_b;              // phase switch B state per stage
    logic [31:0] ps_upd;            // phase switch update flag per stage
    logic [15:0] integ_period;      // cycles per integration, 1..65535
    logic [7:0]  ps_blank;          // phase-switch blanking, 0.1 us units
    logic [7:0]  ireset_blank;      // integrator-reset blanking, 0.1 us units
    logic [31:0] cal_settle;        // cal-diode settling time, 0.1 us units
  } scan_cfg_t;

  // Per-integration configuration (copied at each integration start).
  typedef struct packed {
    logic [1:0] cal_states;         // bit 0 = diode A, bit 1 = diode B
    logic       cal_update;
  } integ_cfg_t;

  // Control register, bit 0 is the least significant field (start_scan).
  typedef struct packed {
    logic drive_cal_b;   // bit 7
    logic drive_cal_a;   // bit 6
    logic drive_ps_b;    // bit 5
    logic drive_ps_a;    // bit 4
    logic en_irq;        // bit 3
    logic reload;        // bit 2
    logic stop_scan;     // bit 1
    logic start_scan;    // bit 0
  } ctrl_t;

  localparam scan_cfg_t SCAN_CFG_DEFAULT = '{
    sample_interval:   16'd250,
    samples_per_cycle: 6'd1,
    ps_a:              32'd0,
    ps_b:              32'd0,
    ps_upd:            32'd0,
    integ_period:      16'd40,
    ps_blank:          8'd0,
    ireset_blank:      8'd0,
    cal_settle:        32'd0
  };

  localparam integ_cfg_t INTEG_CFG_DEFAULT = '{cal_states: 2'b00, cal_update: 1'b0};

  // Register bus word addresses (byte address / 4).
  typedef enum logic [3:0] {
    REG_SAMPLE_INTERVAL = 4'd0,
    REG_SAMPLES_PER_CYC = 4'd1,
    REG_PS_A            = 4'd2,
    REG_PS_B            = 4'd3,
    REG_PS_UPD          = 4'd4,
    REG_INTEG_PERIOD    = 4'd5,
    REG_PS_BLANK        = 4'd6,
    REG_IRESET_BLANK    = 4'd7,
    REG_CAL_SETTLE      = 4'd8,
    REG_CAL_STATES      = 4'd9,
    REG_CAL_UPDATE      = 4'd10,
    REG_CONTROL         = 4'd11,
    REG_INT_SENT        = 4'd12,
    REG_PPS_SENT        = 4'd13
  } reg_addr_e;

  // DMA area layout, byte offsets.
  localparam int DMA_DATA_OFS = 0;                    // 64 x 32-bit integrations
  localparam int DMA_OVF_OFS  = 4 * N_VALUES;         // 8-byte overflow mask
  localparam int DMA_MON_OFS  = DMA_OVF_OFS + 8;      // 16 x 32-bit A/D outputs
  localparam int DMA_WORDS    = N_VALUES + 2 + N_ADC; // words per dump

endpackage
