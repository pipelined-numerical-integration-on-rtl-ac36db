// pnit_pkg: shared fixed-point types of the classical-generator integration
// pipeline.
//
// Every datapath word is a two's-complement fixed-point number written Qm.f:
// m integer bits (sign included) and f fractional bits, m+f bits in all.
// The word formats of the pipeline stages follow the widths of the
// synthesized FPGA datapath: converters Q2.10, calibrated voltage Q2.14,
// currents Q5.11, electrical power Q5.13, d(omega)/dt Q13.23,
// d(delta)/dt Q2.44, angle Q2.52 (Q2.11 after truncation) and sin/cos Q2.12.
// The formats of the per-generator parameters and of the time step are this
// design's own choice. The angle is kept in quarter-turns (units of pi/2
// rad): a Q2 word then spans exactly one turn and wraps without correction,
// and the swing-equation gain is 2*f0/H.
package pnit_pkg;

  // ---- datapath word widths (integer bits, fractional bits) ----
  localparam int ADC_I = 2,  ADC_F = 10;   // ADC / DAC samples      Q2.10
  localparam int VC_I  = 2,  VC_F  = 14;   // calibrated voltage     Q2.14
  localparam int CU_I  = 5,  CU_F  = 11;   // currents               Q5.11
  localparam int PE_I  = 5,  PE_F  = 13;   // electrical power       Q5.13
  localparam int DW_I  = 13, DW_F  = 23;   // d(omega)/dt            Q13.23
  localparam int DD_I  = 2,  DD_F  = 44;   // d(delta)/dt            Q2.44
  localparam int DL_I  = 2,  DL_F  = 52;   // delta                  Q2.52
  localparam int PH_I  = 2,  PH_F  = 11;   // truncated delta        Q2.11
  localparam int TR_I  = 2,  TR_F  = 12;   // sin / cos              Q2.12

  localparam int ADC_W   = ADC_I + ADC_F;  // 12
  localparam int VCAL_W  = VC_I + VC_F;    // 16
  localparam int CUR_W   = CU_I + CU_F;    // 16
  localparam int PE_W    = PE_I + PE_F;    // 18
  localparam int DWDT_W  = DW_I + DW_F;    // 36
  localparam int DDDT_W  = DD_I + DD_F;    // 46
  localparam int DELTA_W = DL_I + DL_F;    // 54
  localparam int PHASE_W = PH_I + PH_F;    // 13
  localparam int TRIG_W  = TR_I + TR_F;    // 14

  // ---- parameter word formats (this design's choice) ----
  localparam int GAIN_W = 16, GAIN_F = 14; // calibration gains      Q2.14
  localparam int IXD_W  = 16, IXD_F  = 10; // 1/x'd                  Q6.10
  localparam int KSW_W  = 18, KSW_F  = 10; // 2*f0/H                 Q8.10
  localparam int EXD_W  = 16, EXD_F  = 11; // E'/x'd                 Q5.11
  localparam int H_W    = 32, H_F    = 32; // time step h, unsigned  Q0.32

  typedef logic signed [ADC_W-1:0]   adc_t;
  typedef logic signed [VCAL_W-1:0]  vcal_t;
  typedef logic signed [CUR_W-1:0]   cur_t;
  typedef logic signed [PE_W-1:0]    pe_t;
  typedef logic signed [DWDT_W-1:0]  dwdt_t;
  typedef logic signed [DDDT_W-1:0]  dddt_t;
  typedef logic signed [DELTA_W-1:0] delta_t;
  typedef logic signed [PHASE_W-1:0] phase_t;
  typedef logic signed [TRIG_W-1:0]  trig_t;
  typedef logic signed [GAIN_W-1:0]  gain_t;
  typedef logic signed [IXD_W-1:0]   ixd_t;
  typedef logic signed [KSW_W-1:0]   ksw_t;
  typedef logic signed [EXD_W-1:0]   exd_t;
  typedef logic        [H_W-1:0]     h_t;

  // Explicit integration method of the integrators.
  typedef enum logic {
    INT_FE  = 1'b0,   // Forward Euler       x + h*f_n
    INT_AB2 = 1'b1    // 2-step Adams-Bashforth x + h*(3/2 f_n - 1/2 f_n-1)
  } int_method_e;

  // Parameters lambda_i of one classical-model generator.
  typedef struct packed {
    gain_t gv_re;   // ADC-side calibration gain, real channel      Q2.14
    gain_t gv_im;   // ADC-side calibration gain, imaginary channel Q2.14
    vcal_t ov_re;   // ADC-side calibration offset                  Q2.14
    vcal_t ov_im;
    ixd_t  inv_xd;  // 1/x'd                                        Q6.10
    ksw_t  ksw;     // 2*f0/H                                       Q8.10
    pe_t   pm;      // mechanical power                             Q5.13
    exd_t  exd;     // E'/x'd                                       Q5.11
    gain_t gi_re;   // DAC-side calibration gain                    Q2.14
    gain_t gi_im;
    adc_t  oi_re;   // DAC-side calibration offset                  Q2.10
    adc_t  oi_im;
  } gen_params_t;

  // Saturate a wide signed value to W bits (W <= 64).
  function automatic logic signed [63:0] sat(input logic signed [127:0] v, input int w);
    logic signed [127:0] hi, lo;
    hi = (128'sd1 <<< (w - 1)) - 1;
    lo = -(128'sd1 <<< (w - 1));
    if (v > hi)      return 64'(hi);
    else if (v < lo) return 64'(lo);
    else             return 64'(v);
  endfunction

endpackage
