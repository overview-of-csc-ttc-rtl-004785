// sit_pkg: types and constants shared by the TTC FPGA and BPI FPGA logic of the
// system-integration-test readout chain.
//
// It holds the two-bit TTC mode code carried from the TTC FPGA to every BPI
// FPGA, the four-bit serial command codes, the register addresses of both FPGAs
// and the bit layout of the 24-bit slice descriptor that precedes each time
// slice. The codes and addresses are the published ones; the struct packing of
// the slice descriptor follows the field order C(4) A(8) reserved(9) T P F.
package sit_pkg;

  // TTC mode lines, TTC FPGA -> BPI FPGA
  typedef enum logic [1:0] {
    TMODE_RUNNING    = 2'b00,
    TMODE_TRIGGER    = 2'b01,
    TMODE_STOPPED    = 2'b10,
    TMODE_SYNC_RESET = 2'b11
  } tmode_e;

  // serial commands (the leading 1 doubles as the start bit)
  localparam logic [3:0] TSC_SLICE_START  = 4'b1001;
  localparam logic [3:0] TSC_RUN_END      = 4'b1010;
  localparam logic [3:0] TSC_ALIGN_FINE   = 4'b1100;
  localparam logic [3:0] TSC_ALIGN_COARSE = 4'b1101;
  localparam logic [3:0] TSC_CHECK_COARSE = 4'b1110;

  // slice descriptor sent with TSC_SLICE_START
  typedef struct packed {
    logic [3:0] fault;     // SCA controller fault code
    logic [7:0] sca_addr;  // SCA cell that holds the slice
    logic [8:0] rsvd;
    logic       ttype;     // 1 = high priority trigger
    logic       phase;     // trigger phase
    logic       first;     // first time slice of the trigger
  } slice_info_t;

  // TTC FPGA registers (16-bit HPU bus)
  localparam logic [3:0] TTCR_DLL_RESET     = 4'd0;  // write
  localparam logic [3:0] TTCR_STATUS        = 4'd0;  // read
  localparam logic [3:0] TTCR_LINK_STATUS   = 4'd1;
  localparam logic [3:0] TTCR_CONTROL       = 4'd2;
  localparam logic [3:0] TTCR_TTCC_FIFO     = 4'd3;
  localparam logic [3:0] TTCR_MISSED_TRIG   = 4'd4;
  localparam logic [3:0] TTCR_TRIGGERS      = 4'd5;
  localparam logic [3:0] TTCR_TTCC_SETUP    = 4'd6;
  localparam logic [3:0] TTCR_DEAD_TIME     = 4'd7;
  localparam logic [3:0] TTCR_MAX_TRIGGERS  = 4'd8;
  localparam logic [3:0] TTCR_TRIGGER_DELAY = 4'd9;
  localparam logic [3:0] TTCR_STG_PERIOD    = 4'd10;
  localparam logic [3:0] TTCR_STG_BURST     = 4'd11;
  localparam logic [3:0] TTCR_SCAC_SETUP    = 4'd12;
  localparam logic [3:0] TTCR_ROSEQ_SETUP   = 4'd13;
  localparam logic [3:0] TTCR_LATENCY_CELLS = 4'd14;
  localparam logic [3:0] TTCR_LUT           = 4'd15;

  // BPI FPGA registers (4-bit bus)
  localparam logic [3:0] BPIR_DLL_RESET     = 4'd0;
  localparam logic [3:0] BPIR_CHIP_ID       = 4'd1;  // write
  localparam logic [3:0] BPIR_STATUS        = 4'd1;  // read
  localparam logic [3:0] BPIR_LINK_STATUS0  = 4'd2;
  localparam logic [3:0] BPIR_LINK_STATUS1  = 4'd3;
  localparam logic [3:0] BPIR_FAL_STATUS0   = 4'd4;
  localparam logic [3:0] BPIR_FAL_STATUS1   = 4'd5;
  localparam logic [3:0] BPIR_ALIGN         = 4'd6;
  localparam logic [3:0] BPIR_CONTROL       = 4'd7;
  localparam logic [3:0] BPIR_TTC_LAT_L     = 4'd8;
  localparam logic [3:0] BPIR_TTC_LAT_H     = 4'd9;
  localparam logic [3:0] BPIR_IN_WC_L       = 4'd10;
  localparam logic [3:0] BPIR_IN_WC_H       = 4'd11;
  localparam logic [3:0] BPIR_OUT_WC_L      = 4'd12;
  localparam logic [3:0] BPIR_OUT_WC_H      = 4'd13;
  localparam logic [3:0] BPIR_REORDER_LUT   = 4'd14;
  localparam logic [3:0] BPIR_AUX_CONTROL   = 4'd15;

  // BPI input sequencer modes (BPIR_Control M field)
  typedef enum logic [1:0] {
    ISM_DISABLED = 2'd0,
    ISM_NORMAL   = 2'd1,
    ISM_CAPTURE0 = 2'd2,
    ISM_CAPTURE1 = 2'd3
  } ism_mode_e;

  // Tx modes (TTCR_SCAC_Setup T field)
  typedef enum logic [1:0] {
    TX_SCA_CONTROL = 2'b00,
    TX_TEST_PATTERN = 2'b01,
    TX_SIM_ASM     = 2'b10,
    TX_RESERVED    = 2'b11
  } tx_mode_e;

  // clock cycles in the 80 us trigger-rate window at 40 MHz
  localparam int unsigned RATE_WINDOW_CLKS = 3200;

  // TTCR_TTCC_Setup
  typedef struct packed {
    logic       cal_en_tdc;    // C
    logic       cal_en_stg;    // c
    logic       stop_at_max;   // S
    logic       stg_no_queue;  // N
    logic       fp_en;         // F
    logic       tdc_en;        // T
    logic       stg_en;        // G
    logic       l1a_en;        // L
    logic       inhibit_insuf; // I
    logic [6:0] max_rate;      // triggers allowed in 80 us
  } ttcc_setup_t;

  // TTCR_STG_Burst
  typedef struct packed {
    logic       one_shot;
    logic [6:0] burst_n;
    logic [7:0] burst_i;
  } stg_burst_t;

  // TTCR_SCAC_Setup
  typedef struct packed {
    logic [1:0] tx_mode;
    logic       lut_addr_reset;
    logic [1:0] write_rate;   // 11 = 40 MHz, else 20 MHz
    logic       read_rate;    // 0 = 5 MHz, 1 = 6.67 MHz
    logic       read_phase;
    logic       simul_rw;
    logic [7:0] slices;       // time slices read out per trigger
  } scac_setup_t;

  // TTCR_ROSEQ_Setup
  typedef struct packed {
    logic       rsvd0;
    logic [2:0] adc_phase;
    logic       rsvd1;
    logic [2:0] sd_phase;
    logic       lut_sel;      // 1 = gray code LUT, 0 = readout sequencer LUT
    logic [1:0] rsvd2;
    logic [4:0] trig_delay;   // extra delay of TRIG_DATA (min 2)
  } roseq_setup_t;

  // TTCR_Control
  typedef struct packed {
    logic       phase_align;
    logic       cycle_align;
    logic       sw_trigger;
    logic       nop_req;
    logic       rsvd;
    logic       check_align;
    logic       run;
    logic       tx_enable;
    logic [7:0] link_en;
  } ttc_control_t;

endpackage
