// zpd_pkg: shared types and constants of the ZPD trigger crate.
//
// The crate is a chain of boards (Sergio, six Finders, six Fitters and a
// Decision Module) that a host configures and inspects over one shared
// memory-mapped bus. This package holds what more than one board needs:
//   * the host bus request/response structs (own choice: the bus protocol
//     itself is not specified, only the block and word addresses),
//   * the one-hot block identifiers and the group identifiers built from them,
//   * the 16-bit segment word, the Finder and Fitter track records and their
//     layout in diagnostic memory words,
//   * the Megabus framing (5 segments per clk120 tick, 32 ticks per event) and
//     the table that maps each Megabus segment:tick slot to a superlayer:sector.
package zpd_pkg;

  // ---------------------------------------------------------------- host bus
  localparam int unsigned BLK_W  = 16;
  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 32;

  // One request per cycle. 'blk' is a mask of block identifiers: every board
  // whose identifier bit is set takes part (broadcast writes to groups).
  typedef struct packed {
    logic [BLK_W-1:0]  blk;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic              we;
    logic              re;
  } host_req_t;

  // Read data returns exactly one cycle after the request.
  typedef struct packed {
    logic              valid;
    logic [DATA_W-1:0] rdata;
  } host_rsp_t;

  // ------------------------------------------------------- block identifiers
  localparam logic [BLK_W-1:0] BLK_SERGIO       = 16'h0001;
  localparam logic [BLK_W-1:0] BLK_CLKMGR_RESET = 16'h4000;
  localparam logic [BLK_W-1:0] BLK_DM           = 16'h8000;
  localparam logic [BLK_W-1:0] BLK_SL10_FINDERS = 16'h002a;
  localparam logic [BLK_W-1:0] BLK_SL7_FINDERS  = 16'h0a80;
  localparam logic [BLK_W-1:0] BLK_ALL_FINDERS  = 16'h0aaa;
  localparam logic [BLK_W-1:0] BLK_SL10_FITTERS = 16'h0054;
  localparam logic [BLK_W-1:0] BLK_SL7_FITTERS  = 16'h1500;
  localparam logic [BLK_W-1:0] BLK_ALL_FITTERS  = 16'h1554;

  localparam int unsigned N_FINDERS = 6;
  localparam int unsigned N_FITTERS = 6;

  // Finder n answers to bit 2n+1, Fitter n to bit 2n+2.
  function automatic logic [BLK_W-1:0] finder_id(int unsigned n);
    return BLK_W'(16'h0002 << (2 * n));
  endfunction
  function automatic logic [BLK_W-1:0] fitter_id(int unsigned n);
    return BLK_W'(16'h0004 << (2 * n));
  endfunction

  // Finders and Fitters 0..2 handle 10-superlayer (A10) tracks, 3..5 handle
  // 7-superlayer (A7) tracks.
  localparam int unsigned N_A10 = 3;

  // ------------------------------------------------ addresses common to all
  localparam logic [ADDR_W-1:0] A_VERSION = 16'h0000;
  localparam logic [ADDR_W-1:0] A_CONTROL = 16'h0001;
  localparam logic [ADDR_W-1:0] A_STATUS  = 16'h0002;

  // Value read from reserved words of the segment / Megabus memories.
  localparam logic [15:0] BADD = 16'hBADD;

  // -------------------------------------------------------- Megabus framing
  localparam int unsigned N_MB_SEG = 5;    // segments per clk120 tick
  localparam int unsigned N_TICK   = 32;   // clk120 ticks per event
  localparam int unsigned N_EVENT  = 64;   // events held in each diagnostic memory
  localparam int unsigned MB_SEG_W = 14;   // bits of a segment sent across the Megabus

  localparam int unsigned N_SL     = 10;   // superlayers 1..10
  localparam int unsigned N_SECTOR = 6;    // sectors 0..5 seen by one board
  localparam int unsigned N_SLOT   = 3;    // segments per SL:sector (consecutive ticks)

  // Segment word: M = mask bit, cell, phi, dphi. Bits 15:14 are never sent.
  typedef struct packed {
    logic [1:0] spare;
    logic       m;
    logic [3:0] cell_id;
    logic [5:0] phi;
    logic [2:0] dphi;
  } segment_t;

  // One clk120 tick on the Megabus: framing (own choice) plus five segments.
  typedef struct packed {
    logic                                   valid;
    logic [5:0]                             event_num;
    logic [4:0]                             tick;
    logic [N_MB_SEG-1:0][MB_SEG_W-1:0]      seg;
  } mb_beat_t;

  // Megabus segment:tick -> superlayer:sector. Ticks 3g..3g+2 of group g carry
  // the three segments of one SL:sector in consecutive ticks. Entry encoding:
  // {valid, sl[3:0], sector[2:0]}; sl counts from 1.
  typedef struct packed {
    logic       valid;
    logic [3:0] sl;
    logic [2:0] sector;
  } slsec_t;

  function automatic slsec_t ss(int unsigned sl, int unsigned sector);
    slsec_t r;
    r.valid  = 1'b1;
    r.sl     = 4'(sl);
    r.sector = 3'(sector);
    return r;
  endfunction

  // group = tick / 3 (0..10), seg = Megabus segment 0..4
  function automatic slsec_t mb_map(int unsigned group, int unsigned seg);
    slsec_t r;
    r = '0;
    case (group)
      0: case (seg) 4: r = ss(1,1);  3: r = ss(1,3);  2: r = ss(1,5);  1: r = ss(10,1); 0: r = ss(10,3); default: ; endcase
      1: case (seg) 4: r = ss(1,2);  3: r = ss(1,4);  2: r = ss(1,0);  1: r = ss(10,2); 0: r = ss(10,4); default: ; endcase
      2: case (seg) 4: r = ss(2,1);  3: r = ss(2,3);  2: r = ss(2,5);  1: r = ss(7,1);  0: r = ss(7,3);  default: ; endcase
      3: case (seg) 4: r = ss(2,2);  3: r = ss(2,4);  2: r = ss(2,0);  1: r = ss(7,2);  0: r = ss(7,4);  default: ; endcase
      4: case (seg) 4: r = ss(3,1);  3: r = ss(3,3);  2: r = ss(3,5);  1: r = ss(5,1);  0: r = ss(5,3);  default: ; endcase
      5: case (seg) 4: r = ss(3,2);  3: r = ss(3,4);  2: r = ss(5,0);  1: r = ss(5,2);  0: r = ss(5,4);  default: ; endcase
      6: case (seg) 4: r = ss(9,1);  3: r = ss(9,3);  2: r = ss(9,5);  1: r = ss(4,1);  0: r = ss(4,3);  default: ; endcase
      7: case (seg) 4: r = ss(9,2);  3: r = ss(9,4);                   1: r = ss(4,2);  0: r = ss(4,4);  default: ; endcase
      8: case (seg) 4: r = ss(6,1);  3: r = ss(6,3);  2: r = ss(6,5);  1: r = ss(8,1);  0: r = ss(8,3);  default: ; endcase
      9: case (seg) 4: r = ss(6,2);  3: r = ss(6,4);                   1: r = ss(8,2);  0: r = ss(8,4);  default: ; endcase
      default: ;
    endcase
    return r;
  endfunction

  // Segments of one event, arranged by superlayer (index sl-1), sector, slot.
  typedef logic [N_SL-1:0][N_SECTOR-1:0][N_SLOT-1:0][MB_SEG_W-1:0] sl_event_t;
  typedef logic [N_SL-1:0][N_SECTOR-1:0]                           sl_present_t;

  // ------------------------------------------------------ Finder track record
  // Held as 16 words per track: 0 hitmask, 1 {dipbin,rhobin}, 2..11 segphi of
  // SL 1..10, 12..15 unused (read as 0).
  typedef struct packed {
    logic [9:0]        hitmask;
    logic [5:0]        dipbin;
    logic [5:0]        rhobin;
    logic [9:0][15:0]  segphi;     // segphi[sl-1]
  } finder_track_t;

  localparam int unsigned FND_WORDS = 12;   // stored words per track

  function automatic logic [FND_WORDS-1:0][15:0] finder_words(finder_track_t t);
    logic [FND_WORDS-1:0][15:0] w;
    w[0] = {6'b0, t.hitmask};
    w[1] = {4'b0, t.dipbin, t.rhobin};
    for (int i = 0; i < 10; i++) w[2+i] = t.segphi[i];
    return w;
  endfunction

  // ------------------------------------------------------ Fitter track record
  // Four words per track: 0 hitmask, 1 {rho,z0err}, 2 z0, 3 dip.
  typedef struct packed {
    logic [9:0] hitmask;
    logic [7:0] rho;
    logic [3:0] z0err;
    logic [7:0] z0;
    logic [7:0] dip;
  } fit_track_t;

  localparam int unsigned FIT_WORDS  = 4;    // words per track
  localparam int unsigned FIT_LINK_W = 12;   // bits per word sent to the Decision Module

  function automatic logic [FIT_WORDS-1:0][15:0] fit_words(fit_track_t t);
    logic [FIT_WORDS-1:0][15:0] w;
    w[0] = {6'b0, t.hitmask};
    w[1] = {4'b0, t.rho, t.z0err};
    w[2] = {8'b0, t.z0};
    w[3] = {8'b0, t.dip};
    return w;
  endfunction

  function automatic fit_track_t fit_unpack(logic [FIT_WORDS-1:0][11:0] w);
    fit_track_t t;
    t.hitmask = w[0][9:0];
    t.rho     = w[1][11:4];
    t.z0err   = w[1][3:0];
    t.z0      = w[2][7:0];
    t.dip     = w[3][7:0];
    return t;
  endfunction

  // One word on a Fitter -> Decision Module link.
  typedef struct packed {
    logic                  valid;
    logic [5:0]            event_num;
    logic [2:0]            word;     // 0..3 seed 0, 4..7 seed 1
    logic [FIT_LINK_W-1:0] data;
  } fit_link_t;

  // Decision Module selection windows, one set per decision bit and track type.
  typedef struct packed {
    logic [7:0] rho_min;
    logic [7:0] rho_max;
    logic [7:0] tandip_min;
    logic [7:0] tandip_max;
    logic [7:0] z0_min;
    logic [7:0] z0_max;
    logic [3:0] z0err_max;
  } window_t;

  localparam int unsigned N_DECISION = 8;

endpackage
