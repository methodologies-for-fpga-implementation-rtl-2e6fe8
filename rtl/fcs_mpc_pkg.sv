// fcs_mpc_pkg - shared constants and types of the FCS-MPC motor controller.
//
// All datapath quantities are two's-complement fixed point written Qa.b, with
// a integer bits, b fractional bits and one sign bit (total a+b+1 bits). The
// controller works with a 16-bit fractional word length (FWL) on every signal
// between modules; the sine table uses 15 fractional bits.
//
// The motor constants are the nominal values of the 10-pole interior permanent
// magnet synchronous motor the controller was built for (Ld = 11 mH,
// Lq = 14.3 mH, flux linkage 333.3 mWb, Rs = 400 mOhm) and the 300 V DC link.
// The integer word lengths below are chosen to cover the ranges of the
// signals: phase currents within +/-10 A, phase voltages 0..300 V, dq
// voltages within +/-200 V after the transform, electrical speed 0..367 rad/s.
package fcs_mpc_pkg;

  // ---------------------------------------------------------------- clocking
  localparam int unsigned CLK_HZ = 100_000_000;  // system clock

  // ------------------------------------------------------- fixed-point sizes
  localparam int unsigned FWL      = 16;  // fractional bits between modules
  localparam int unsigned SIN_FWL  = 15;  // fractional bits of table values
  localparam int unsigned SIN_W    = 16;  // Q0.15 sine/cosine, pre-scaled 2/3
  localparam int unsigned PH_IWL   = 9;   // phase quantity (A or V), Q9.16
  localparam int unsigned PH_W     = PH_IWL + FWL + 1;
  localparam int unsigned DQ_IWL   = 10;  // transform output, Q10.16
  localparam int unsigned DQ_W     = DQ_IWL + FWL + 1;
  localparam int unsigned I_IWL    = 4;   // measured Id/Iq fed to the model, Q4.16
  localparam int unsigned I_W      = I_IWL + FWL + 1;
  localparam int unsigned V_IWL    = 8;   // Vd/Vq fed to the model, Q8.16
  localparam int unsigned V_W      = V_IWL + FWL + 1;
  localparam int unsigned W_IWL    = 9;   // electrical speed in rad/s, Q9.16
  localparam int unsigned W_W      = W_IWL + FWL + 1;
  localparam int unsigned IP_IWL   = 5;   // predicted Id/Iq, Q5.16
  localparam int unsigned IP_W     = IP_IWL + FWL + 1;
  localparam int unsigned COST_IWL = 7;   // cost, Q7.16
  localparam int unsigned COST_W   = COST_IWL + FWL + 1;

  // ------------------------------------------------------------ angle / table
  localparam int unsigned THETA_N  = 16000;  // table entries per electrical turn
  localparam int unsigned THETA_W  = 14;
  localparam int unsigned EDGES_PER_ETURN = 64000;  // encoder edges per electrical turn

  // --------------------------------------------------------- inverter states
  localparam int unsigned N_STATES = 8;
  // {a, b, c}: 1 = upper switch of that leg on (phase at Vdc), 0 = lower on.
  typedef logic [2:0] sw_state_t;

  typedef struct packed {
    logic a_p, a_n, b_p, b_n, c_p, c_n;
  } gates_t;

  typedef struct packed {
    logic signed [PH_W-1:0] a, b, c;
  } abc_t;

  // The six pre-scaled trigonometric values used by the abc->dq transform.
  typedef struct packed {
    logic signed [SIN_W-1:0] cos0, sin0;  // theta
    logic signed [SIN_W-1:0] cosm, sinm;  // theta - 2pi/3
    logic signed [SIN_W-1:0] cosp, sinp;  // theta + 2pi/3
  } trig_t;

  // -------------------------------------------------------- motor and drive
  localparam real MOTOR_RS     = 0.400;     // ohm
  localparam real MOTOR_LD     = 11.0e-3;   // H
  localparam real MOTOR_LQ     = 14.3e-3;   // H
  localparam real MOTOR_LAMBDA = 0.3333;    // Wb
  localparam real VDC          = 300.0;     // V

  // Real to fixed point by truncation toward zero.
  function automatic longint to_fix(real x, int unsigned fwl);
    return longint'($rtoi(x * (2.0 ** fwl)));
  endfunction

endpackage
