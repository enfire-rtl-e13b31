// enfire_pkg: constants, instruction encoding and shared types of the ENFIRE
// fabric.
//
// ENFIRE is a spatio-temporal reconfigurable fabric. Each memory logic block
// (MLB) keeps up to 32 eight-input lookup tables in a 2-bank SRAM and
// evaluates them one schedule-table entry per clock, two instructions per
// entry (VLIW-2). MLBs are grouped four to a cluster (8-bit intra-cluster
// lane per MLB) and four clusters to a tile (4-bit inter-cluster lane per MLB).
//
// The sizes (64 one-bit registers, 64 x 128-bit schedule table, two
// 256 x 64-bit banks, 8-input LUTs with 1/2/4/8-bit outputs, eight LUTs of
// each width, 6-bit register addresses) follow the published architecture.
// The bit layout of an instruction slot is this design's own:
//
//   [63:62] opcode      00 NOP, 01 LUT, 10 MOVE, 11 HALT
//   LUT
//   [61:60] size        0: 8x1, 1: 8x2, 2: 8x4, 3: 8x8
//   [59:57] lut index   [59] bank, [58:57] segment within the bank
//   [56]    bus out     response bits 3:0 -> nibble <slot> of own intra lane
//   [55]    vreg        register addresses 40..63 read the other MLBs' lanes
//   [54]    write en    write the response to the register file
//   [53:48] write addr  [53:51] row, [50:48] bit offset in the row
//   [47:0]  inputs      input i (row address bit i) at [6i+5:6i]
//   MOVE
//   [61]    dir         0 send (drive own lane), 1 receive (write register)
//   [60]    level       0 intra-cluster, 1 inter-cluster
//   [59]    width       0 4 bits, 1 8 bits (intra-cluster only)
//   [53:48] write addr  receive: row and bit offset, as for LUT
//   [47:45] src row     send: register row read
//   [44]    src nibble  send, 4 bits: which nibble of that row
//   [43]    dst nibble  send, 4 bits, intra: which nibble of own lane
//   [42]    rx nibble   receive, 4 bits intra: nibble of the source lane
//   [41:40] rx mlb      receive: source MLB within its cluster
//   [39:38] rx cluster  receive, inter: source cluster
package enfire_pkg;

  localparam int unsigned N_REGS        = 64;   // one-bit registers per MLB
  localparam int unsigned REG_ROW_W     = 8;    // register row / write port width
  localparam int unsigned N_REG_ROWS    = N_REGS / REG_ROW_W;
  localparam int unsigned REG_AW        = 6;    // register bit address
  localparam int unsigned N_SLOTS       = 2;    // VLIW-2
  localparam int unsigned SLOT_W        = 64;   // bits per instruction slot
  localparam int unsigned SCHED_DEPTH   = 64;   // schedule-table entries
  localparam int unsigned PC_W          = 6;
  localparam int unsigned LUT_IN        = 8;    // LUT inputs = bank row address bits
  localparam int unsigned MEM_ROWS      = 256;
  localparam int unsigned MEM_COLS      = 64;
  localparam int unsigned N_BANKS       = 2;
  localparam int unsigned N_MLB         = 4;    // MLBs per cluster
  localparam int unsigned N_CLUSTER     = 4;    // clusters per tile
  localparam int unsigned INTRA_LANE_W  = 8;    // intra-cluster lane per MLB
  localparam int unsigned INTER_LANE_W  = 4;    // inter-cluster lane per MLB
  localparam int unsigned INTER_BUS_W   = N_MLB * INTER_LANE_W;  // 16
  localparam int unsigned VREG_BASE     = 40;   // first virtual register address

  typedef enum logic [1:0] {
    OP_NOP  = 2'b00,
    OP_LUT  = 2'b01,
    OP_MOVE = 2'b10,
    OP_HALT = 2'b11
  } opcode_e;

  typedef enum logic [1:0] {
    LUT_8X1 = 2'd0,
    LUT_8X2 = 2'd1,
    LUT_8X4 = 2'd2,
    LUT_8X8 = 2'd3
  } lut_size_e;

  // Decoded instruction slot.
  typedef struct packed {
    logic                          is_lut;
    logic                          is_move;
    logic                          is_halt;
    // LUT
    lut_size_e                     size;
    logic [2:0]                    lut_idx;
    logic                          bus_out;
    logic                          vreg;
    logic                          reg_we;
    logic [REG_AW-1:0]             waddr;
    logic [LUT_IN-1:0][REG_AW-1:0] in_addr;
    // MOVE
    logic                          mv_recv;
    logic                          mv_inter;
    logic                          mv_wide;
    logic [2:0]                    mv_src_row;
    logic                          mv_src_nib;
    logic                          mv_dst_nib;
    logic                          mv_rx_nib;
    logic [1:0]                    mv_rx_mlb;
    logic [1:0]                    mv_rx_cluster;
  } dec_t;

  // Read request of one slot to the LUT/data memory.
  typedef struct packed {
    logic              valid;
    logic              bank;
    logic [7:0]        row;
    logic [5:0]        seg_lsb;   // lowest column of the segment
    lut_size_e         size;
  } mem_req_t;

  // Configuration write targets.
  typedef enum logic [2:0] {
    CFG_SCHED0 = 3'd0,   // schedule table, slot 0 half
    CFG_SCHED1 = 3'd1,   // schedule table, slot 1 half
    CFG_BANK0  = 3'd2,   // memory bank 0 row
    CFG_BANK1  = 3'd3,   // memory bank 1 row
    CFG_REGS   = 3'd4    // whole register file
  } cfg_sel_e;

  typedef struct packed {
    logic          we;
    logic [3:0]    mlb;     // {cluster, mlb in cluster}
    cfg_sel_e      sel;
    logic [7:0]    addr;
    logic [63:0]   wdata;
  } cfg_req_t;

  // Output width of a LUT size: 1, 2, 4 or 8.
  function automatic logic [3:0] lut_width(lut_size_e s);
    return 4'd1 << s;
  endfunction

  // Lowest column of segment k (0..3) of a given width, as laid out in the
  // segmented wordline of a bank row. The 4-bit segment at 31..28 is not
  // addressable as a LUT and is left for plain data.
  function automatic logic [5:0] seg_lsb(lut_size_e s, logic [1:0] k);
    logic [5:0] r;
    unique case (s)
      LUT_8X8: r = 6'd32 + 6'(k) * 6'd8;                 // 39-32 .. 63-56
      LUT_8X4: case (k)                                  // 7-4 15-12 23-20 27-24
                 2'd0: r = 6'd4;
                 2'd1: r = 6'd12;
                 2'd2: r = 6'd20;
                 default: r = 6'd24;
               endcase
      LUT_8X2: case (k)                                  // 3-2 11-10 17-16 19-18
                 2'd0: r = 6'd2;
                 2'd1: r = 6'd10;
                 2'd2: r = 6'd16;
                 default: r = 6'd18;
               endcase
      default: case (k)                                  // 0 1 8 9
                 2'd0: r = 6'd0;
                 2'd1: r = 6'd1;
                 2'd2: r = 6'd8;
                 default: r = 6'd9;
               endcase
    endcase
    return r;
  endfunction

  // Mask of the low <width> bits of a byte.
  function automatic logic [7:0] width_mask(lut_size_e s);
    return 8'((9'd1 << lut_width(s)) - 9'd1);
  endfunction

  // Encoders used by testbenches and program generators.
  function automatic logic [SLOT_W-1:0] enc_lut(lut_size_e size, logic [2:0] idx,
                                                logic bus_out, logic vreg, logic reg_we,
                                                logic [5:0] waddr,
                                                logic [LUT_IN-1:0][REG_AW-1:0] in_addr);
    return {OP_LUT, size, idx, bus_out, vreg, reg_we, waddr, in_addr};
  endfunction

  function automatic logic [SLOT_W-1:0] enc_send(logic inter, logic wide, logic [2:0] src_row,
                                                 logic src_nib, logic dst_nib);
    logic [SLOT_W-1:0] r;
    r = '0;
    r[63:62] = OP_MOVE;
    r[61] = 1'b0;
    r[60] = inter;
    r[59] = wide;
    r[47:45] = src_row;
    r[44] = src_nib;
    r[43] = dst_nib;
    return r;
  endfunction

  function automatic logic [SLOT_W-1:0] enc_recv(logic inter, logic wide, logic [5:0] waddr,
                                                 logic rx_nib, logic [1:0] rx_mlb,
                                                 logic [1:0] rx_cluster);
    logic [SLOT_W-1:0] r;
    r = '0;
    r[63:62] = OP_MOVE;
    r[61] = 1'b1;
    r[60] = inter;
    r[59] = wide;
    r[53:48] = waddr;
    r[42] = rx_nib;
    r[41:40] = rx_mlb;
    r[39:38] = rx_cluster;
    return r;
  endfunction

  localparam logic [SLOT_W-1:0] INSTR_NOP  = '0;
  localparam logic [SLOT_W-1:0] INSTR_HALT = {OP_HALT, 62'd0};

endpackage
