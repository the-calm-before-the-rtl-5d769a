// Shared types and constants of the Zephyr scheduler.
//
// Zephyr places a coarse-grain sorting stage (latency prediction plus
// delay FIFOs and per-thread pre-issue buffers) in front of a Cyclone
// switchback scheduler so that instructions reach the Cyclone queues only
// shortly before their operands are ready. This package holds the
// instruction record that travels through every stage and the machine
// constants. The thread count, issue width and cache latencies follow the
// modelled processor (4 threads, 8-wide, 2-cycle L1, 12-cycle L2, 164-cycle
// memory); register counts, sequence-number width and timestamp width are
// this design's own choices.
package zephyr_pkg;

  localparam int unsigned NUM_THREADS = 4;
  localparam int unsigned THR_W       = $clog2(NUM_THREADS);
  localparam int unsigned ISSUE_W     = 8;
  localparam int unsigned NUM_LREGS   = 32;
  localparam int unsigned LREG_W      = $clog2(NUM_LREGS);
  localparam int unsigned NUM_PREGS   = 256;
  localparam int unsigned PREG_W      = $clog2(NUM_PREGS);
  localparam int unsigned SEQ_W       = 7;
  localparam int unsigned PC_W        = 32;
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned BLK_OFF     = 5;   // 32-byte L1 blocks
  localparam int unsigned LAT_W       = 8;
  localparam int unsigned L1_LAT      = 2;
  localparam int unsigned L2_LAT      = 12;
  localparam int unsigned MEM_LAT     = 164;

  typedef logic [31:0]        time_t;   // absolute cycle number
  typedef logic [THR_W-1:0]   thr_t;
  typedef logic [LREG_W-1:0]  lreg_t;
  typedef logic [PREG_W-1:0]  preg_t;
  typedef logic [SEQ_W-1:0]   seq_t;
  typedef logic [LAT_W-1:0]   lat_t;

  // Coarse sorting queue classes and their delay in cycles.
  typedef enum logic [2:0] {
    QC_0   = 3'd0,
    QC_5   = 3'd1,
    QC_10  = 3'd2,
    QC_20  = 3'd3,
    QC_150 = 3'd4
  } qclass_e;

  localparam int unsigned NUM_QCLASS = 5;

  // Sorting queue line-up: six 0-slot, four 5-slot, two 10-slot,
  // two 20-slot and two 150-slot queues, numbered in that order.
  localparam int unsigned NUM_SORTQ = 16;

  function automatic qclass_e sortq_class(int unsigned q);
    if (q < 6)       return QC_0;
    else if (q < 10) return QC_5;
    else if (q < 12) return QC_10;
    else if (q < 14) return QC_20;
    else             return QC_150;
  endfunction

  // Largest class whose delay does not exceed a wait time (round down).
  function automatic qclass_e wait_class(logic signed [31:0] w);
    if (w >= 150)     return QC_150;
    else if (w >= 20) return QC_20;
    else if (w >= 10) return QC_10;
    else if (w >= 5)  return QC_5;
    else              return QC_0;
  endfunction

  function automatic int unsigned qclass_delay(qclass_e c);
    case (c)
      QC_0:    return 0;
      QC_5:    return 5;
      QC_10:   return 10;
      QC_20:   return 20;
      default: return 150;
    endcase
  endfunction

  // Instruction as delivered by rename: one entry of a dispatch group.
  typedef struct packed {
    thr_t  thr;
    seq_t  seq;
    logic  [PC_W-1:0] pc;
    logic  is_load;
    lat_t  lat;        // execution latency for non-loads
    logic  src1_v;
    lreg_t lsrc1;
    preg_t psrc1;
    logic  src2_v;
    lreg_t lsrc2;
    preg_t psrc2;
    logic  dst_v;
    lreg_t ldst;
    preg_t pdst;
  } instr_t;

  // Instruction after prediction: what the sorting and Cyclone stages need.
  typedef struct packed {
    thr_t  thr;
    seq_t  seq;
    logic  is_load;
    logic  stall_tag;     // unpredictable load that holds its thread (stall mode)
    time_t issue_at;   // predicted cycle at which all operands are ready
    logic  par1_v;     // parent 1 was dispatched and may still be sorting
    seq_t  par1;
    logic  par2_v;
    seq_t  par2;
    logic  src1_v;
    preg_t psrc1;
    logic  src2_v;
    preg_t psrc2;
    logic  dst_v;
    lreg_t ldst;
    preg_t pdst;
  } sinstr_t;

  // Signed distance a - b between two timestamps.
  function automatic logic signed [31:0] tdiff(time_t a, time_t b);
    return $signed(a - b);
  endfunction

endpackage
