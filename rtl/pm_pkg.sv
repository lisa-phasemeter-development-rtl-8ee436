// pm_pkg: widths, constants and shared record types of the four-channel
// DPLL phasemeter.
//
// The phase accumulator is 104 bits wide and the phase increment register
// 60 bits, both aligned at bit 0: bits [59:0] of the accumulator are the
// fractional part of a cycle and bits [103:60] count whole cycles. These two
// widths and the four channels follow the design description; the ADC width
// (16), sine table size (4096 x 16), DAC width (14) and DIOB word (32) are
// this design's own choices.
package pm_pkg;

  localparam int NCH     = 4;     // input channels
  localparam int PA_W    = 104;   // phase accumulator
  localparam int PIR_W   = 60;    // phase increment register
  localparam int ADC_W   = 16;    // ADC sample width
  localparam int LUT_AW  = 12;    // sine table address bits
  localparam int LUT_DW  = 16;    // sine table sample width
  localparam int MIX_W   = ADC_W + LUT_DW;  // mixer product / I,Q filter width
  localparam int DAC_W   = 14;
  localparam int DIOB_W  = 32;

  // Bytes of one channel in the readout record: I, Q, PA, PIR (padded to 64)
  localparam int CH_BYTES  = MIX_W/8 + MIX_W/8 + PA_W/8 + 8;
  localparam int ALIGN_BYTES = 16;                // horizontal, vertical (64 bits each)
  localparam int REC_BYTES = 1 + NCH*CH_BYTES + ALIGN_BYTES;  // with sequence number byte

  // Per-channel loop settings.
  typedef struct packed {
    logic [PIR_W-1:0] pir_init;  // nominal NCO frequency, f = pir*fs/2^60
    logic [5:0]       kp_shift;  // proportional gain 2^kp_shift
    logic [5:0]       ki_shift;  // integral gain 2^ki_shift
    logic             loop_en;   // 1: loop closed
  } ch_cfg_t;

  // Per-channel internal test signal generator settings.
  typedef struct packed {
    logic             use_nco;   // 1: channel input from test NCO, 0: ADC
    logic [PIR_W-1:0] pir;       // test NCO frequency word
    logic [3:0]       amp_shift; // test NCO attenuation (2^-amp_shift)
  } tst_cfg_t;

  // Results of one channel that go to downsampling and readout.
  typedef struct packed {
    logic signed [MIX_W-1:0] i;    // low-passed I-branch product (amplitude)
    logic signed [MIX_W-1:0] q;    // low-passed Q-branch product (phase error)
    logic [PA_W-1:0]         pa;   // low-passed phase accumulator
    logic [PIR_W-1:0]        pir;  // phase increment register (frequency)
  } ch_result_t;

  // Intermediate signals of one channel offered to the DIOB port.
  typedef struct packed {
    logic signed [ADC_W-1:0] sample;
    logic signed [MIX_W-1:0] mix_i;
    logic signed [MIX_W-1:0] mix_q;
    logic signed [MIX_W-1:0] lpf_i;
    logic signed [MIX_W-1:0] lpf_q;
    logic signed [PIR_W-1:0] pic;
    logic [PIR_W-1:0]        pir;
    logic [PA_W-1:0]         pa;
  } ch_debug_t;

  // DIOB signal select codes
  typedef enum logic [2:0] {
    DIOB_SAMPLE = 3'd0, DIOB_MIX_I = 3'd1, DIOB_MIX_Q = 3'd2, DIOB_LPF_I = 3'd3,
    DIOB_LPF_Q  = 3'd4, DIOB_PIC   = 3'd5, DIOB_PIR   = 3'd6, DIOB_PA    = 3'd7
  } diob_sel_e;

endpackage
