// agata_pkg: types and constants shared by the AGATA phase-2 front-end firmware blocks.
// Samples are 14-bit ADC codes carried in 16-bit words (2 bytes per sample at 100 Msps),
// timestamps are 48-bit counts of the 100 MHz GTS clock (10 ns), and the GTS trigger
// processor serves up to 256 leaves, so a leaf number is 8 bits. The packet type codes and
// the request/reply layouts are this design's own choice.
package agata_pkg;
  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned TS_W     = 48;
  localparam int unsigned LEAF_W   = 8;
  localparam int unsigned ENERGY_W = 16;
  localparam int unsigned WORD_W   = 64;

  typedef logic [TS_W-1:0] ts_t;

  // Trigger request sent by a leaf up the GTS tree.
  typedef struct packed {
    logic [LEAF_W-1:0] leaf;
    ts_t               ts;
  } gts_req_t;

  // Validation (accept = 1) or rejection (accept = 0) returned to a leaf.
  typedef struct packed {
    logic [LEAF_W-1:0] leaf;
    ts_t               ts;
    logic              accept;
  } gts_reply_t;

  // Packet types carried in the first (header) word of every readout frame.
  typedef enum logic [7:0] {
    PKT_EVENT     = 8'h01,
    PKT_LONGTRACE = 8'h02,
    PKT_SPECTRUM  = 8'h03,
    PKT_MONITOR   = 8'h04,
    PKT_IDLE      = 8'h10,
    PKT_ERROR     = 8'h11,
    PKT_SYSOFF    = 8'h12
  } pkt_type_t;

  // Slow-control configuration of the pre-processing firmware (one register set).
  typedef struct packed {
    logic [7:0]       trig_ch;      // channel whose discriminator starts events (the core)
    logic             le_mode;      // 1: leading edge, 0: constant fraction
    logic [15:0]      threshold;
    logic [4:0]       cfd_delay;    // CFD delay - 1, samples
    logic [4:0]       cfd_diff;     // fast difference span - 1, samples
    logic [7:0]       cfd_frac;     // constant fraction, /256
    logic [10:0]      mwd_m;        // MWD window, samples (<= 2000)
    logic [10:0]      mwd_l;        // trapezoid rise, samples
    logic [23:0]      mwd_k;        // 1/tau, /2^24
    logic [10:0]      peak;         // samples from trigger to energy sampling
    logic [5:0]       e_shift;      // trapezoid to energy scaling
    logic             ev_long;      // 200 instead of 100 samples per trace
    logic [5:0]       ev_pre;       // pre-trigger samples
    logic [31:0]      ev_timeout;   // GTS answer time-out, samples
    logic [3:0]       sp_shift;     // energy to spectrum bin scaling
    logic [15:0]      idle_period;  // clocks of silence before an IDLE frame
    logic [3:0][1:0]  route;        // readout engine of each source
    logic [7:0]       mon_ch;       // monitored channel
    logic [1:0]       mon_sel;      // 0 sample, 1 CFD signal, 2 trapezoid, 3 energy
    logic [15:0]      mon_len;      // monitored samples
  } pace_cfg_t;
endpackage
