// Shared types and constants of the SMT vector processor.
//
// The 32-bit vector instruction carries an opcode, up to three 5-bit
// virtual register names, a 2-bit vector length code and a 2-bit thread
// ID. The field widths (5-bit register names, 2-bit VL, 2-bit thread ID)
// follow the document; the bit positions, the opcode values and the spare
// bits are this design's own choice. Instructions marked by has_data()
// are followed by a 32-bit operand word (scalar, VM address, RLT data).
//
// lane_op_t is what the vector controller broadcasts to the lanes after
// renaming and virtualization: register names are already lane-local VRF
// base addresses and the element count is per lane.
//
// The size constants serve as parameter defaults of the modules that need
// them; when a single module is checked on its own, the constants that
// only other modules use show up as unused.
package vp_pkg;

  localparam int NLANES     = 4;    // vector lanes
  localparam int NTHREADS   = 4;    // simultaneous vector threads
  localparam int PREG_W     = 6;    // physical register name width
  localparam int VRF_DEPTH  = 256;  // 32-bit elements per lane
  localparam int VRF_AW     = 8;
  localparam int VM_WORDS   = 4096; // 16 KB per bank, 64 KB in total
  localparam int VM_AW      = 12;
  localparam int CNT_W      = 7;    // elements per lane, up to 64

  typedef enum logic [3:0] {
    OP_VADD   = 4'd0,
    OP_VADD_S = 4'd1,
    OP_VSUB   = 4'd2,
    OP_VSUB_S = 4'd3,
    OP_VMUL   = 4'd4,
    OP_VMUL_S = 4'd5,
    OP_VLD    = 4'd6,
    OP_VLD_S  = 4'd7,
    OP_VST    = 4'd8,
    OP_VST_S  = 4'd9,
    OP_VSHUF  = 4'd10,  // RD[RT[i]] = RS[i] through the shuffle network
    OP_VRLT   = 4'd11,  // program eight RLT entries of one lane
    OP_NOP    = 4'd15
  } vop_e;

  // VL code: 0 -> 16, 1 -> 32, 2 -> 64
  typedef struct packed {
    vop_e       op;      // [31:28]
    logic [4:0] dst;     // [27:23]
    logic [4:0] src1;    // [22:18]
    logic [4:0] src2;    // [17:13]
    logic [1:0] vl;      // [12:11]
    logic [1:0] tid;     // [10:9]
    logic [7:0] spare;   // [8:1]
    logic       use_rlt; // [0] shuffle: reorder through the RLT
  } vinstr_t;

  // instruction plus its optional operand word, as seen by the VC
  typedef struct packed {
    vinstr_t     ins;
    logic [31:0] data;
  } vpkt_t;

  typedef struct packed {
    vop_e              op;
    logic [1:0]        tid;
    logic [CNT_W-1:0]  cnt;      // elements per lane (0 for VRLT)
    logic [VRF_AW-1:0] rd_base;
    logic [VRF_AW-1:0] rs1_base;
    logic [VRF_AW-1:0] rs2_base;
    logic [VM_AW-1:0]  vm_base;  // lane-local VM word address
    logic [VM_AW-1:0]  vm_stride;
    logic [31:0]       data;     // scalar operand or RLT data
    logic              use_rlt;
    logic [4:0]        dst;      // raw dst field (RLT half select)
    logic [4:0]        src1;     // raw src1 field (RLT lane select)
  } lane_op_t;

  function automatic logic has_data(vop_e op);
    case (op)
      OP_VADD_S, OP_VSUB_S, OP_VMUL_S,
      OP_VLD, OP_VLD_S, OP_VST, OP_VST_S, OP_VRLT: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic is_ldst(vop_e op);
    return op inside {OP_VLD, OP_VLD_S, OP_VST, OP_VST_S};
  endfunction

  function automatic logic is_store(vop_e op);
    return op inside {OP_VST, OP_VST_S};
  endfunction

  // which register fields an instruction reads / writes
  function automatic logic writes_dst(vop_e op);
    return !(op inside {OP_VST, OP_VST_S, OP_VRLT, OP_NOP});
  endfunction

  function automatic logic reads_src1(vop_e op);
    return !(op inside {OP_VLD, OP_VLD_S, OP_VRLT, OP_NOP});
  endfunction

  function automatic logic reads_src2(vop_e op);
    return op inside {OP_VADD, OP_VSUB, OP_VMUL, OP_VSHUF};
  endfunction

  // log2 of the vector length: 4, 5 or 6
  function automatic logic [2:0] vl_log2(logic [1:0] code);
    return 3'd4 + {1'b0, code};
  endfunction

endpackage
