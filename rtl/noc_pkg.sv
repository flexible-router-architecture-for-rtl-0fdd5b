// noc_pkg: types and constants shared by the Flexible router and the mesh.
//
// A packet travels as one link-wide word (one packet per cycle per link,
// store-and-forward). Its seven fields follow the packet format of the
// design: destination X/Y, source X/Y, sequence number, time of transmission
// and a payload word. The field widths are this design's choice: 3-bit
// coordinates cover meshes up to 8x8 (the reference mesh is 5x5), 16-bit
// sequence and time stamps, and a 32-bit payload.
//
// Port directions are numbered E, W, N, S, L. Y grows towards North and X
// towards East.
package noc_pkg;

  localparam int unsigned COORD_W = 3;
  localparam int unsigned SEQ_W   = 16;
  localparam int unsigned TIME_W  = 16;
  localparam int unsigned INFO_W  = 32;

  localparam int unsigned NPORTS  = 5;   // E, W, N, S, L
  localparam int unsigned NFLEX   = 4;   // E, W, N, S take part in flexibility

  typedef enum logic [2:0] {
    DIR_E = 3'd0,
    DIR_W = 3'd1,
    DIR_N = 3'd2,
    DIR_S = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t              dst_x;
    coord_t              dst_y;
    coord_t              src_x;
    coord_t              src_y;
    logic [SEQ_W-1:0]    seq;
    logic [TIME_W-1:0]   tx_time;
    logic [INFO_W-1:0]   info;
  } packet_t;


  // Per-router event pulses, one bit per flexible input port (E, W, N, S).
  typedef struct packed {
    logic [NFLEX-1:0] contention;  // request met a full own FIFO this cycle
    logic [NFLEX-1:0] flex_store;  // packet stored in another port's FIFO
    logic [NFLEX-1:0] b2b_retry;   // chosen FIFO filled up: search again
  } router_ev_t;

  // Which packet directions the FIFO of flexible input port `buf_port` may
  // hold. It is the set a packet entering through that port can take under
  // XY routing, which keeps the router free of routing deadlock:
  //   E buffer: W, N, S, L     W buffer: E, N, S, L
  //   N buffer: S, L           S buffer: N, L
  function automatic logic buffer_accepts(input dir_e buf_port, input dir_e pkt_dir);
    unique case (buf_port)
      DIR_E:   return pkt_dir inside {DIR_W, DIR_N, DIR_S, DIR_L};
      DIR_W:   return pkt_dir inside {DIR_E, DIR_N, DIR_S, DIR_L};
      DIR_N:   return pkt_dir inside {DIR_S, DIR_L};
      DIR_S:   return pkt_dir inside {DIR_N, DIR_L};
      default: return 1'b1;
    endcase
  endfunction

  // The flexible port that is the j-th "other" port of port p (j = 0..2),
  // counted upwards from p and skipping p: E -> W, N, S; W -> N, S, E; ...
  function automatic dir_e other_port(input dir_e p, input int unsigned j);
    return dir_e'((int'(p) + int'(j) + 1) % NFLEX);
  endfunction

endpackage
