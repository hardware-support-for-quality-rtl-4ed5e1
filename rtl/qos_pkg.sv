// Shared types and constants of the RDMA QoS engine.
//
// The engine keeps one 256-bit descriptor line per virtual channel (16 pages of
// 128 channels, 2048 lines), segments memory transfers into 64 KB blocks that
// it writes as 256-bit block descriptors to a 1024-entry transaction table,
// and turns small transfers (up to 32 bytes, payload carried in the descriptor)
// and completion notifications into packets for a packet queue.
//
// Sizes follow the reference design: 2048 channels, 1024 transaction IDs (512
// for transfers without congestion management, 512 grouped into 128 flow IDs
// of 4 TIDs each), 64 KB blocks, flows of 4 blocks, 2 outstanding blocks per
// transfer, 16 intra priorities and 2 + 4*16 scheduling queues.
// Field encodings that are this design's own choice (not fixed by the
// reference): the 5-bit transfer type, the ordering of queues of equal class
// (intra priority 0 is served first), the packet-queue entry layout and the
// 17-bit block size field of the block descriptor (a 64 KB block does not fit
// in 16 bits).
package qos_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_LINES    = 2048;  // transfer table lines / channels
  localparam int unsigned IDX_W        = 11;
  localparam int unsigned NUM_WCH      = 1024;  // write channels (status registers)
  localparam int unsigned WCH_W        = 10;
  localparam int unsigned LINE_W       = 256;
  localparam int unsigned NUM_TIDS     = 1024;  // transaction table entries
  localparam int unsigned TID_W        = 10;
  localparam int unsigned NUM_FREE_TID = 512;   // TIDs of non congestion-managed blocks
  localparam int unsigned FID_W        = 8;
  localparam int unsigned FID1_BASE    = 128;   // unipath flow IDs 128..191
  localparam int unsigned FID1_NUM     = 64;
  localparam int unsigned FID4_BASE    = 192;   // multipath flow ID groups 192,196..252
  localparam int unsigned FID4_NUM     = 16;
  localparam int unsigned FLOW_LOG2    = 2;     // 4 blocks (TIDs) per flow
  localparam int unsigned BLOCK_LOG2   = 16;    // 64 KB blocks
  localparam int unsigned MAX_OUTSTANDING = 2;
  localparam int unsigned SEQ_W        = 12;
  localparam int unsigned BN_W         = 18;    // block counters
  localparam int unsigned INTRA_PRIO   = 16;
  localparam int unsigned NUM_Q        = 2 + 4 * INTRA_PRIO;
  localparam int unsigned Q_W          = $clog2(NUM_Q);
  localparam int unsigned INLINE_MAX   = 32;    // bytes of payload in a descriptor

  // ----------------------------------------------------------- queue map
  // Highest priority first: control, TID only, 1xFID have-FID, 1xFID no-FID,
  // 4xFID have-FID, 4xFID no-FID.
  localparam logic [Q_W-1:0] Q_CTRL = Q_W'(0);
  localparam logic [Q_W-1:0] Q_TID  = Q_W'(1);

  function automatic logic [Q_W-1:0] q_uni_have(input logic [3:0] p);
    return Q_W'(2 + p);
  endfunction
  function automatic logic [Q_W-1:0] q_uni_no(input logic [3:0] p);
    return Q_W'(2 + INTRA_PRIO + p);
  endfunction
  function automatic logic [Q_W-1:0] q_multi_have(input logic [3:0] p);
    return Q_W'(2 + 2 * INTRA_PRIO + p);
  endfunction
  function automatic logic [Q_W-1:0] q_multi_no(input logic [3:0] p);
    return Q_W'(2 + 3 * INTRA_PRIO + p);
  endfunction

  // ----------------------------------------------------- transfer types
  typedef enum logic [1:0] {
    CM_NONE  = 2'd0,  // TID only
    CM_UNI   = 2'd1,  // 1 flow ID
    CM_MULTI = 2'd2   // 4 flow IDs
  } cm_mode_e;

  // 5-bit type field: {reserved, notification, cm_mode[1:0], inline}
  typedef struct packed {
    logic     rsvd;
    logic     notify;
    cm_mode_e cm;
    logic     inl;
  } xfer_type_t;

  // First descriptor line (word0 in the low 64 bits).
  typedef struct packed {
    logic [62:0] rsvd;
    logic        enq;       // last line of the descriptor
    logic [31:0] size;
    logic [22:0] qos;
    logic [3:0]  prio;
    xfer_type_t  ttype;
    logic [63:0] dst;
    logic [63:0] src;       // payload_0 for inline transfers
  } desc_line0_t;

  // Second descriptor line: notification addresses or payload words 1..3.
  typedef struct packed {
    logic [62:0] rsvd;
    logic        enq;
    logic [63:0] w2;        // last data notification / payload_3
    logic [63:0] w1;        // first data notification / payload_2
    logic [63:0] w0;        // destination address notification / payload_1
  } desc_line1_t;

  // ------------------------------------------------------------ metadata
  typedef struct packed {
    logic [8:0]       fid;
    logic [15:0]      tid_bitmap;
    logic [3:0]       next_tid;
    logic             in_sched;
    logic [BN_W-1:0]  block_num;
    logic [3:0]       outstanding;
    logic             last_issued;
    logic             last_acked;
    logic [TID_W-1:0] last_tid;
    logic [SEQ_W-1:0] last_seq;
  } meta_t;

  // ------------------------------------------------ pending transactions
  typedef struct packed {
    logic             valid;
    logic [31:0]      issue_time;
    logic [SEQ_W-1:0] seq;
    logic [IDX_W-1:0] xfer;
    logic [3:0]       prio;
    logic [21:0]      qos;
    logic [BN_W-1:0]  total_blocks;
    logic             last;
    logic             has_notif;
    cm_mode_e         cm;
    logic [Q_W-1:0]   rq;           // queue the transfer is re-enqueued to on ACK
    logic [9:0]       rsvd;
  } pend_t;

  // ------------------------------------------------ block (transaction) descriptor
  typedef struct packed {
    logic [27:0] nu3;
    logic [10:0] nu2;
    logic        has_next;
    logic [10:0] nu1;
    logic [16:0] block_size;
    logic        chained;
    logic        notif_en;
    logic        done;
    logic [8:0]  nu0;
    logic        initialized;
    logic        cm;
    logic [15:0] bytes_sent;
    logic [13:0] seq;
    logic [15:0] pdid;
    logic [63:0] dst;
    logic [63:0] src;
  } txn_desc_t;

  // --------------------------------------------------- packet queue entry
  typedef enum logic {PKT_INLINE = 1'b0, PKT_CTRL = 1'b1} pkt_kind_e;

  typedef struct packed {
    pkt_kind_e        kind;
    logic [TID_W-1:0] tid;
    logic [SEQ_W-1:0] seq;
    logic [3:0]       pdid;
    logic [5:0]       size;     // payload bytes (inline) or 24 (control)
    logic [63:0]      dst;
    logic [255:0]     payload;  // inline data, or the three notification words
  } packet_t;

  // --------------------------------------------------- scheduling queues
  typedef struct packed {
    logic [Q_W-1:0]   q;
    logic             started;  // first block already issued
    logic [IDX_W-1:0] idx;
  } sched_req_t;

  // ------------------------------------------------------ channel status
  typedef enum logic [2:0] {
    ST_IDLE  = 3'b000,
    ST_BUSY  = 3'b001,
    ST_DONE  = 3'b010,
    ST_ERROR = 3'b100
  } status_e;

  function automatic logic [1:0] status_bin(input logic [2:0] oh);
    return {oh[2] | oh[1], oh[2] | oh[0]};  // IDLE 0, BUSY 1, DONE 2, ERROR 3
  endfunction

  // Write channel of a transfer table line: {page, channel[5:0]}.
  function automatic logic [WCH_W-1:0] wch_of(input logic [IDX_W-1:0] idx);
    return {idx[10:7], idx[5:0]};
  endfunction

  // ------------------------------------------------- segmentation maths
  function automatic logic [BN_W-1:0] total_blocks(input logic [63:0] dst,
                                                   input logic [31:0] size);
    logic [64:0] fin;
    logic [BN_W-1:0] n;
    fin = {1'b0, dst} + {33'd0, size};
    n = BN_W'(fin[64:BLOCK_LOG2] - {1'b0, dst[63:BLOCK_LOG2]});
    if (fin[BLOCK_LOG2-1:0] != '0) n = n + 1'b1;
    return n;
  endfunction

  function automatic logic [BLOCK_LOG2:0] first_block_size(input logic [63:0] dst,
                                                            input logic [31:0] size);
    logic [BLOCK_LOG2:0] room;
    room = (BLOCK_LOG2+1)'(1 << BLOCK_LOG2) - {1'b0, dst[BLOCK_LOG2-1:0]};
    if ({15'd0, room} > size) return size[BLOCK_LOG2:0];
    return room;
  endfunction

endpackage
