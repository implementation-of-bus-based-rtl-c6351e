// mp3soc_pkg: types and constants shared by the two on-chip interconnects
// (3x3 mesh NoC and 9-port shared bus) and by the host/audio side of the MP3
// decoder platform.
//
// Flit (26 bits, LSB first): [1:0] flit type, [5:2] destination {x,y},
// [9:6] origin {x,y}, [25:10] 16 data bits. Coordinates are two bits each;
// x counts left to right, y top to bottom. Only body flits are used, since
// every flit carries its own destination and origin.
//
// Router ports are numbered PE, N, E, W, S as drawn in the router diagram.
// Bus word (26 bits): 16 data, 8 address {source port, destination port},
// 2 control {ack from slave, request from master}.
//
// Lint note: some constants here (widths, message type codes) are used
// only by some of the modules that import the package, so a module
// compiled alone reports them unused.
package mp3soc_pkg;

  localparam int unsigned DATA_W  = 16;
  localparam int unsigned COORD_W = 2;
  localparam int unsigned LOC_W   = 2 * COORD_W;
  localparam int unsigned FLIT_W  = 26;

  typedef enum logic [1:0] {
    FLIT_HEAD = 2'b00,
    FLIT_BODY = 2'b01,
    FLIT_TAIL = 2'b10
  } flit_type_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } loc_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    loc_t              origin;
    loc_t              dest;
    flit_type_e        ftype;
  } flit_t;

  // Router port indices
  localparam int unsigned NPORTS = 5;
  localparam int unsigned P_PE = 0;
  localparam int unsigned P_N  = 1;
  localparam int unsigned P_E  = 2;
  localparam int unsigned P_W  = 3;
  localparam int unsigned P_S  = 4;

  // Shared bus
  localparam int unsigned BUS_ADDR_W = 8;
  localparam int unsigned BUS_W      = DATA_W + BUS_ADDR_W + 2;

  typedef struct packed {
    logic [DATA_W-1:0]     data;
    logic [BUS_ADDR_W-1:0] addr;   // {source port [7:4], destination port [3:0]}
    logic                  ack;    // BUS_Control[1], driven by the addressed slave
    logic                  req;    // BUS_Control[0], driven by the master
  } bus_word_t;

  // Host message types (first three bytes: length, fourth byte: type)
  localparam logic [7:0] MSG_MP3_DATA  = 8'd55;
  localparam logic [7:0] MSG_FREE_REQ  = 8'd56;
  localparam logic [7:0] MSG_FREE_RESP = 8'd57;
  localparam logic [7:0] MSG_START     = 8'd58;

  // MP3 frame header fields (bit positions of the 32-bit header)
  typedef struct packed {
    logic [11:0] sync;          // 31:20
    logic        version;       // 19
    logic [1:0]  layer;         // 18:17
    logic        protection;    // 16
    logic [3:0]  bitrate_idx;   // 15:12
    logic [1:0]  samprate_idx;  // 11:10
    logic        padding;       // 9
    logic        private_bit;   // 8
    logic [1:0]  channel_mode;  // 7:6
    logic [1:0]  mode_ext;      // 5:4
    logic        copyright;     // 3
    logic        original;      // 2
    logic [1:0]  emphasis;      // 1:0
  } mp3_header_t;

  // XY routing: first along x until the column matches, then along y.
  // y grows towards the N port (a flit from (1,0) to (1,1) leaves on N).
  function automatic logic [2:0] xy_route(loc_t here, loc_t dest);
    if (dest.x > here.x)      return 3'(P_E);
    else if (dest.x < here.x) return 3'(P_W);
    else if (dest.y > here.y) return 3'(P_N);
    else if (dest.y < here.y) return 3'(P_S);
    else                      return 3'(P_PE);
  endfunction

endpackage
