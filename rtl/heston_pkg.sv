// heston_pkg: types and constants shared by the multi-asset Heston / barrier
// option Monte Carlo engine.
//
// All model arithmetic is two's-complement fixed point: fx_t is a signed
// 32-bit word with 20 fractional bits (range about +/-2048, step about 1e-6),
// which holds spot prices of a few hundred, variances, rates and Gaussian
// samples. The word format is this design's choice; the source architecture
// does not state its number format.
//
// The parameter table row (param_row_t) carries, for one asset of a thread,
// the quantities of the full-truncation Euler step already multiplied by the
// time step (mu*dt, kappa*dt, xi*sqrt(dt), sqrt(dt)), plus the initial
// state, the correlation of the variance noise with the asset noise, and the
// option's barrier and strike. ctrl_wr_t is one write on the control bus
// that loads the parameter table, the correlation matrix and the run
// configuration.
package heston_pkg;

  localparam int unsigned FX_W    = 32;
  localparam int unsigned FX_FRAC = 20;

  typedef logic signed [FX_W-1:0] fx_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_FRAC;

  // Payoff values: non-negative, with headroom for sums over a thread.
  localparam int unsigned PAY_W = 40;
  typedef logic [PAY_W-1:0] pay_t;

  // Fields of one parameter-table row, by their field index on the bus.
  typedef enum logic [3:0] {
    F_S0      = 4'd0,   // initial spot S(0)
    F_V0      = 4'd1,   // initial variance v(0)
    F_MU_DT   = 4'd2,   // drift times time step, mu*dt
    F_KAPPA_DT= 4'd3,   // mean-reversion rate times time step, kappa*dt
    F_THETA   = 4'd4,   // long-term variance theta
    F_XI_SQDT = 4'd5,   // vol-of-vol times sqrt(dt)
    F_SQDT    = 4'd6,   // sqrt(dt)
    F_RHO     = 4'd7,   // correlation of variance noise with asset noise
    F_RHO_C   = 4'd8,   // sqrt(1 - rho^2)
    F_BARRIER = 4'd9,   // down-and-out barrier level B
    F_STRIKE  = 4'd10   // strike K
  } param_field_e;

  localparam int unsigned NUM_FIELDS = 11;

  typedef struct packed {
    fx_t s0;
    fx_t v0;
    fx_t mu_dt;
    fx_t kappa_dt;
    fx_t theta;
    fx_t xi_sqdt;
    fx_t sqdt;
    fx_t rho;
    fx_t rho_c;
    fx_t barrier;
    fx_t strike;
  } param_row_t;

  // Control bus address map (16-bit word address):
  //   [15:12] region: 0 configuration, 1 parameter table, 2 correlation matrix
  //   region 1: [11:4] asset row, [3:0] field (param_field_e)
  //   region 2: [11:6] matrix row, [5:0] matrix column
  //   region 0: [3:0] register (CFG_*)
  typedef enum logic [3:0] {
    REG_CFG   = 4'd0,
    REG_PARAM = 4'd1,
    REG_CORR  = 4'd2
  } ctrl_region_e;

  localparam logic [3:0] CFG_NSTEPS = 4'd0;  // time steps to maturity
  localparam logic [3:0] CFG_PATHS  = 4'd1;  // threads (paths) per core
  localparam logic [3:0] CFG_MODE   = 4'd2;  // bit0 barrier enable, bit1 payoff mode

  typedef struct packed {
    logic        we;
    logic [15:0] addr;
    logic [31:0] data;
  } ctrl_wr_t;

  // Payoff mode of the payoff calculator.
  typedef enum logic {
    PAYOFF_WORST_OF = 1'b0,  // one path per thread: (min_i (S_i(T) - K_i))^+
    PAYOFF_VANILLA  = 1'b1   // every asset its own path: sum_i (S_i(T) - K_i)^+
  } payoff_mode_e;

  // What a pipeline slot does at its issue cycle (decided by the scheduler).
  typedef enum logic [1:0] {
    SLOT_IDLE = 2'd0,  // no thread: issue a bubble, ignore what comes out
    SLOT_INIT = 2'd1,  // new thread: issue S(0), v(0), ignore what comes out
    SLOT_RUN  = 2'd2   // running thread: feed the result back for the next step
  } slot_cmd_e;

  // Fixed-point multiply with truncation toward minus infinity.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FX_FRAC);
  endfunction

  function automatic fx_t fx_max0(fx_t a);
    return a[FX_W-1] ? '0 : a;
  endfunction

  // Square root of a non-negative fixed-point value, truncated:
  // isqrt(a * 2^FX_FRAC) by the digit-by-digit (restoring) method, one result
  // bit per iteration.
  function automatic fx_t fx_sqrt(fx_t a);
    logic [2*FX_W-1:0] rad, rem, trial;
    logic [FX_W-1:0]   root;
    rad  = {{FX_W{1'b0}}, a} << FX_FRAC;
    rem  = '0;
    root = '0;
    for (int i = FX_W - 1; i >= 0; i--) begin
      rem   = (rem << 2) | ((rad >> (2 * i)) & 64'd3);
      trial = ({{FX_W{1'b0}}, root} << 2) | 1;
      if (rem >= trial) begin
        rem  = rem - trial;
        root = (root << 1) | 1;
      end else begin
        root = root << 1;
      end
    end
    return fx_t'(root);
  endfunction

endpackage
