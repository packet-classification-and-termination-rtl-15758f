// ppp_pkg: types and constants shared by the protocol processor (PPP) and its
// Control Memory Access Accelerator (CMAA).
//
// The entry counts M (primary look-up engine), N (secondary look-up engine),
// the control memory address width W and the 32-bit data buses follow the
// design point the architecture was evaluated at (M=16, N=64, W=20). The
// 6-instruction CMAA instruction set is the architecture's; its binary
// encoding, the C&C instruction word, the functional page command codes and
// the control memory buffer layout are this implementation's own choices.
package ppp_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DW        = 32;   // data buses and input buffer chain
  localparam int unsigned M_ENTRIES = 16;   // PLUE (IP ID CAM) entries
  localparam int unsigned N_ENTRIES = 64;   // SLUE entries per CAM
  localparam int unsigned CM_AW     = 20;   // W: control memory address width
  localparam int unsigned PLUE_LAT  = 2;    // PLUE search cycles
  localparam int unsigned SLUE_LAT  = 3;    // SLUE search cycles

  // Connection key held in the SLUE: internal type (8) + source port (16) +
  // destination port (16) = 40 bits, plus 128 address bits.
  localparam int unsigned TYPE_W = 8;
  localparam int unsigned PORT_W = 16;
  localparam int unsigned IPA_W  = 128;

  typedef struct packed {
    logic [TYPE_W-1:0] ptype;   // internal packet type (CAM 0)
    logic [PORT_W-1:0] sport;   // source port          (CAM 1)
    logic [PORT_W-1:0] dport;   // destination port     (CAM 2)
    logic [31:0]       adr0;    // address word 0       (CAM 3)
    logic [31:0]       adr1;    // address word 1       (CAM 4)
    logic [63:0]       adr2;    // address words 2..3   (CAM 5)
  } conn_key_t;

  // One wildcard bit per SLUE CAM, 1 = field ignored.
  typedef logic [5:0] slue_mask_t;

  // ---------------------------------------------------- CMAA instructions
  typedef enum logic [2:0] {
    CI_NOP        = 3'd0,
    CI_NEW_PACKET = 3'd1,   // cfg = packet type, data = IP identification
    CI_LOAD_REG   = 3'd2,   // cfg[2:0] = register (0 ports, 1..4 address word)
    CI_ID_CAM     = 3'd3,   // cfg[1:0] = cam_op_e on the PLUE
    CI_PA_CAM     = 3'd4,   // cfg[1:0] = cam_op_e on the SLUE
    CI_RELEASE    = 3'd5,   // release packet to the micro controller
    CI_SET_MEMBUF = 3'd6    // cfg[1:0] = buffer region for this packet
  } cmaa_op_e;

  typedef enum logic [1:0] {
    CAM_READ   = 2'd0,
    CAM_WRITE  = 2'd1,
    CAM_REMOVE = 2'd2
  } cam_op_e;

  typedef struct packed {
    cmaa_op_e   op;
    logic [7:0] cfg;
    logic       frag;   // NEW_PACKET: packet is a fragment
    logic       l4;     // NEW_PACKET: fragment carries the layer 4 header
    logic       last;   // LOAD_REG: last register of this packet
  } cmaa_instr_t;

  // Load register selects
  localparam logic [2:0] LR_PORTS = 3'd0;
  localparam logic [2:0] LR_ADR0  = 3'd1;
  localparam logic [2:0] LR_ADR1  = 3'd2;
  localparam logic [2:0] LR_ADR2  = 3'd3;
  localparam logic [2:0] LR_ADR3  = 3'd4;

  // Control memory buffer regions handed out by the buffer pointer generator
  typedef enum logic [1:0] {
    BUF_PACKET = 2'd0,   // reassembly (packet) buffers
    BUF_CONN   = 2'd1,   // connection buffers
    BUF_CTRL   = 2'd2    // control-protocol packet buffers (ARP, ICMP, ...)
  } buf_region_e;
  localparam int unsigned N_REGIONS = 3;

  // Packet buffer layout (word offsets)
  localparam logic [7:0] PB_CONN_PTR  = 8'd0;  // written by the CMAA
  localparam logic [7:0] PB_LEN_RCVD  = 8'd1;  // length received so far
  localparam logic [7:0] PB_LEN_TOTAL = 8'd2;  // total length, 0 = unknown
  localparam logic [7:0] PB_CSUM      = 8'd3;  // accumulated checksum

  // CMAA control states
  typedef enum logic [2:0] {
    CS_WAIT   = 3'd0,   // wait for new packet; micro controller owns memory
    CS_LOAD   = 3'd1,   // PLUE search while loading SLUE registers
    CS_CHECK  = 3'd2,   // check connection in the SLUE
    CS_STORE  = 3'd3,   // data bus 1 -> packet buffer
    CS_READY  = 3'd4,   // packet ready, PPP accesses control memory
    CS_UPDATE = 3'd5    // buffer pointer update, CAM write-address search
  } cmaa_state_e;

  // One word of the input buffer chain. `be` marks the valid bytes; the byte
  // in data[31:24] is first on the wire.
  typedef struct packed {
    logic        valid;
    logic        sop;
    logic        eop;
    logic [3:0]  be;
    logic [31:0] data;
  } stream_word_t;

  // C&C flag inputs
  localparam int unsigned N_FLAGS = 16;
  localparam logic [3:0] FLG_ZERO    = 4'd0;   // constant 0 (unconditional jumps)
  localparam logic [3:0] FLG_CSM1_DONE = 4'd1; // checksum adder 1 idle
  localparam logic [3:0] FLG_CRC_OK  = 4'd2;
  localparam logic [3:0] FLG_XAC0    = 4'd3;
  localparam logic [3:0] FLG_XAC1    = 4'd4;
  localparam logic [3:0] FLG_CSM0_OK = 4'd5;
  localparam logic [3:0] FLG_CSM1_OK = 4'd6;
  localparam logic [3:0] FLG_READY   = 4'd7;   // CMAA packet ready
  localparam logic [3:0] FLG_DISCARD = 4'd8;   // CMAA found no connection
  localparam logic [3:0] FLG_FRAG    = 4'd9;   // IPv4 fragment (MF or offset)
  localparam logic [3:0] FLG_FIRST   = 4'd10;  // fragment offset 0
  localparam logic [3:0] FLG_MF      = 4'd11;  // more fragments
  localparam logic [3:0] FLG_SETTLED = 4'd12;  // CMAA ready or discarded
  localparam logic [3:0] FLG_CRC_DONE= 4'd13;
  localparam logic [3:0] FLG_PLUE_HIT= 4'd14;  // packet buffer already existed
  localparam logic [3:0] FLG_RVALID  = 4'd15;  // control memory read returned

  // ------------------------------------------------- functional page commands
  localparam int unsigned N_FP = 8;
  localparam int unsigned FP_CRC = 0;
  localparam int unsigned FP_XAC0 = 1;
  localparam int unsigned FP_XAC1 = 2;
  localparam int unsigned FP_LEN0 = 3;
  localparam int unsigned FP_LEN1 = 4;
  localparam int unsigned FP_CSM0 = 5;
  localparam int unsigned FP_CSM1 = 6;
  localparam int unsigned FP_GADD = 7;

  typedef struct packed {
    logic        valid;
    logic [3:0]  cmd;
    logic [15:0] imm;
  } fp_cmd_t;

  // CRC page
  localparam logic [3:0] CRC_START = 4'd1;  // restart with this word, run to end of packet
  // XAC page
  localparam logic [3:0] XAC_CMP_REF = 4'd1; // compare field with configured reference
  localparam logic [3:0] XAC_CMP_EXT = 4'd2; // compare whole word with external operand
  localparam logic [3:0] XAC_EXTRACT = 4'd3; // extract field only
  // length counter page
  localparam logic [3:0] LEN_LOAD     = 4'd1; // acc = data[15:0]
  localparam logic [3:0] LEN_ADD_HI   = 4'd2; // acc += data[31:16]
  localparam logic [3:0] LEN_ADD_LO   = 4'd3; // acc += data[15:0]
  localparam logic [3:0] LEN_SUB_IMM  = 4'd4; // acc -= imm
  localparam logic [3:0] LEN_ADD_EXT  = 4'd5; // acc += external operand
  localparam logic [3:0] LEN_CLEAR    = 4'd6; // acc = 0
  // checksum page
  localparam logic [3:0] CSM_START    = 4'd1; // sum = this word, add imm[7:0]-1 more (0: to end of packet; imm[8]: leave out the last word)
  localparam logic [3:0] CSM_LOAD     = 4'd2; // sum = data[15:0] (a stored partial sum)
  localparam logic [3:0] CSM_ADD_HALF = 4'd3; // sum += data[15:0]
  // generic adder page
  localparam logic [3:0] GA_ADD = 4'd1;
  localparam logic [3:0] GA_SUB = 4'd2;

  // --------------------------------------------------------- C&C program
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_WAITW = 4'd1,   // stall until the word counter equals `a`
    OP_FP    = 4'd2,   // command `cmd` with `imm` to page `sel`, data from `tap`
    OP_CMAA  = 4'd3,   // CMAA op sel[2:0], cfg `a`, last cmd[0], data from `tap`
    OP_JMP4  = 4'd4,   // pc = a + {flag[sel], flag[cmd]}
    OP_WAITF = 4'd5,   // stall until flag[sel] == cmd[0]
    OP_DEC   = 4'd6,   // packet decision imm[1:0]
    OP_END   = 4'd7,   // back to idle
    OP_MEMRD = 4'd8,   // read word `a` of buffer sel[0] into data bus 2
    OP_MEMWR = 4'd9    // write source sel[3:1] to word `a` of buffer sel[0]
  } cc_op_e;

  localparam int unsigned TAP_W = 5;   // chain tap select width

  typedef struct packed {
    cc_op_e            op;
    logic [3:0]        sel;
    logic [3:0]        cmd;
    logic [TAP_W-1:0]  tap;
    logic [7:0]        a;
    logic [15:0]       imm;
  } cc_instr_t;    // 41 bits

  // Functional page data come from the chain tap, or from data bus 2 (the
  // last control memory read) when imm[15] of the command is set.
  localparam int unsigned IMM_BUS2 = 15;

  typedef enum logic [1:0] {
    DEC_DISCARD = 2'd0,
    DEC_HOST    = 2'd1,   // payload to host memory (TCP, UDP)
    DEC_CTRL    = 2'd2    // payload to control memory (ARP, ICMP, ...)
  } decision_e;

endpackage
