// ahb_pkg -- shared types and constants of the AHB bus-functional model.
//
// Holds the encodings of the AHB transfer type, burst type, transfer size and
// slave response (the values are those of the AMBA 2.0 AHB definition, and
// match the codes that appear on the model's waveforms: NONSEQ = 2'b10,
// SEQ = 2'b11, BUSY = 2'b01, ERROR = 2'b01, RETRY = 2'b10, INCR4 = 3'b011),
// the 32-bit address and data widths, the "no master" HMASTER code 4'hF used
// while no master owns the bus, and the packed structs that carry one
// master's address/control bundle and one slave's response bundle through
// the interconnect.
package ahb_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned MID_W  = 4;          // width of HMASTER
  localparam logic [MID_W-1:0] NO_MASTER = 4'hF;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  typedef enum logic [2:0] {
    HSIZE_BYTE = 3'b000,
    HSIZE_HALF = 3'b001,
    HSIZE_WORD = 3'b010
  } hsize_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Default protection: data access, privileged, not bufferable/cacheable.
  localparam logic [3:0] HPROT_DEFAULT = 4'b0011;

  // Address and control bundle of one master (HADDR/HCTL in the bus figure).
  typedef struct packed {
    logic [ADDR_W-1:0] haddr;
    htrans_e           htrans;
    logic              hwrite;
    hsize_e            hsize;
    hburst_e           hburst;
    logic [3:0]        hprot;
  } ahb_ctrl_t;

  // Response bundle of one slave.
  typedef struct packed {
    logic [DATA_W-1:0] hrdata;
    logic              hready;
    hresp_e            hresp;
  } ahb_sresp_t;

  localparam ahb_ctrl_t CTRL_IDLE = '{haddr: '0, htrans: HTRANS_IDLE, hwrite: 1'b0,
                                      hsize: HSIZE_BYTE, hburst: HBURST_SINGLE,
                                      hprot: HPROT_DEFAULT};

  // Number of beats of a burst type (undefined-length INCR counts as 1 here:
  // the arbiter does not hold the bus for it).
  function automatic int unsigned burst_beats(hburst_e b);
    case (b)
      HBURST_WRAP4,  HBURST_INCR4:  return 4;
      HBURST_WRAP8,  HBURST_INCR8:  return 8;
      HBURST_WRAP16, HBURST_INCR16: return 16;
      default:                      return 1;
    endcase
  endfunction

endpackage
