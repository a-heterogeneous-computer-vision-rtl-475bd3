// apa_pkg -- types and constants shared by the associative processor array
// (APA) module: the GLiTCH chips, the data routing network, the data store,
// the scalar unit and the microprogrammed controller.
//
// Sizes that come from the published design: 4 GLiTCH chips of 64 1-bit PEs,
// a 64-digit ternary data CAM plus a 4-digit subset CAM per PE, 16-digit
// (32-bit) patterns at the chip pins, an 8-bit video path, 32-bit data
// routing, a 32 kword x 96-bit micromemory.
//
// Choices of this implementation: the 2-bit ternary digit code, the
// microinstruction field layout (its field order follows the published
// assembler listing header SEQ / addr / CC / DS / addr / SU-TR / GLITCH, the
// widths are our own), every opcode list below, the data store and chip RAM
// depths, the stack depths and the stage each unit executes in.
package apa_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_CHIPS      = 4;    // GLiTCH chips in the array
  localparam int unsigned N_PE         = 64;   // PEs per chip
  localparam int unsigned DATA_DIGITS  = 64;   // data CAM digits per PE
  localparam int unsigned SUB_DIGITS   = 4;    // subset CAM digits per PE
  localparam int unsigned PAT_DIGITS   = 16;   // pattern digits at the pins
  localparam int unsigned BUS_W        = 32;   // data routing bus width
  localparam int unsigned PIX_W        = 8;    // video pixel width
  localparam int unsigned UW           = 96;   // microinstruction width
  localparam int unsigned UDEPTH       = 32768;// micromemory words
  localparam int unsigned UAW          = 15;   // micromemory address width
  localparam int unsigned DS_AW        = 12;   // data store address width
  localparam int unsigned RAM_AW       = 10;   // chip RAM address width
  localparam int unsigned OFF_W        = 6;    // digit offset in the CAM word

  // ------------------------------------------------------- ternary digits
  // A digit is {care, value}: 2'b10 = '0', 2'b11 = '1', 2'b0? = 'x'.
  typedef logic [1:0] tdigit_t;
  localparam tdigit_t T_X   = 2'b00;
  localparam tdigit_t T_0   = 2'b10;
  localparam tdigit_t T_1   = 2'b11;

  typedef tdigit_t [DATA_DIGITS-1:0] dword_t;  // data CAM word / pattern
  typedef tdigit_t [SUB_DIGITS-1:0]  sword_t;  // subset CAM word / pattern
  typedef tdigit_t [PAT_DIGITS-1:0]  pword_t;  // 16-digit pin pattern

  // Two ternary digits match unless both care and their values differ.
  function automatic logic tmatch(tdigit_t a, tdigit_t b);
    return !(a[1] && b[1] && (a[0] != b[0]));
  endfunction

  // ------------------------------------------------------- GLiTCH opcodes
  typedef enum logic [4:0] {
    G_NOP       = 5'd0,
    G_MATCH     = 5'd1,   // tag <= match
    G_MATCH_AND = 5'd2,   // tag <= tag & match
    G_MATCH_OR  = 5'd3,   // tag <= tag | match
    G_WRITE     = 5'd4,   // write pattern's cared digits into tagged PEs
    G_WRITE_ALL = 5'd5,   // same, in every PE
    G_SHIFT_UP  = 5'd6,   // tag <= tag of PE i-1
    G_SHIFT_DN  = 5'd7,   // tag <= tag of PE i+1
    G_FIRST     = 5'd8,   // keep only the first tagged PE of the array
    G_SET_ALL   = 5'd9,   // tag <= 1
    G_CLR_ALL   = 5'd10,  // tag <= 0
    G_NOT       = 5'd11,  // tag <= ~tag
    G_R_LD      = 5'd12,  // R <= tag
    G_TAG_LD_R  = 5'd13,  // tag <= R
    G_TAG_AND_R = 5'd14,  // tag <= tag & R
    G_TAG_OR_R  = 5'd15,  // tag <= tag | R
    G_TAG_XOR_R = 5'd16,  // tag <= tag ^ R
    G_READ      = 5'd17,  // latch field of first tagged PE onto chip port
    G_VSR_XFER  = 5'd18   // swap 8 CAM digits at offset with the VSR byte
  } gop_e;

  // ---------------------------------------------------- sequencer opcodes
  typedef enum logic [3:0] {
    S_CONT    = 4'd0,   // pc + 1
    S_JUMP    = 4'd1,   // if cc: addr
    S_CALL    = 4'd2,   // if cc: push pc+1, addr
    S_RET     = 4'd3,   // if cc: pop
    S_LOOP    = 4'd4,   // push {pc+1, count=addr}; continue
    S_ENDLOOP = 4'd5,   // count != 0: count--, back to loop start; else pop
    S_CASE    = 4'd6,   // addr + case index
    S_WAIT    = 4'd7,   // stay here until cc
    S_HALT    = 4'd8    // stop and stay here
  } sop_e;

  // condition code select (CC field)
  typedef enum logic [2:0] {
    CC_ALWAYS  = 3'd0,
    CC_SU_ZERO = 3'd1,
    CC_SU_NEG  = 3'd2,
    CC_SU_TEST = 3'd3,
    CC_SOME    = 3'd4,   // some PE of the array tagged
    CC_HOST    = 3'd5,   // flag set by the host transputer
    CC_NEVER   = 3'd6,
    CC_RSV     = 3'd7
  } cc_e;

  // ---------------------------------------------------- data store opcodes
  typedef enum logic [3:0] {
    D_NOP    = 4'd0,
    D_RD     = 4'd1,   // read  [addr]
    D_WR     = 4'd2,   // write [addr] <= bus
    D_RD_AR  = 4'd3,   // read  [AR]
    D_WR_AR  = 4'd4,   // write [AR]
    D_RD_INC = 4'd5,   // read  [AR], AR++
    D_WR_INC = 4'd6,   // write [AR], AR++
    D_RD_DEC = 4'd7,   // AR--, read  [AR]
    D_WR_DEC = 4'd8,   // AR--, write [AR]
    D_LD_AR  = 4'd9,   // AR <= addr
    D_LD_ARB = 4'd10   // AR <= bus
  } dop_e;

  // --------------------------------------------------- scalar unit opcodes
  typedef enum logic [3:0] {
    U_NOP  = 4'd0,
    U_LOAD = 4'd1,   // S <= bus
    U_SHL  = 4'd2,   // S <= S << n
    U_SHR  = 4'd3,   // S <= S >> n (logical)
    U_ASR  = 4'd4,   // S <= S >>> n
    U_ROL  = 4'd5,   // rotate left n
    U_TEST = 4'd6    // test flag <= S[n]
  } uop_e;

  // -------------------------------------------- transputer (TR) opcodes
  typedef enum logic [3:0] {
    T_NOP  = 4'd0,
    T_ATTN = 4'd1,   // raise the attention request to the host
    T_PUT  = 4'd2    // mailbox to host <= bus
  } top_e;

  // ------------------------------------------------- routing bus sources
  typedef enum logic [2:0] {
    B_NONE = 3'd0,
    B_DS   = 3'd1,
    B_SU   = 3'd2,
    B_TR   = 3'd3,
    B_DRN  = 3'd4
  } bsrc_e;

  // ------------------------------------------- data routing network modes
  typedef enum logic [2:0] {
    R_HOLD  = 3'd0,   // keep the chip patterns
    R_BCAST = 3'd1,   // every chip <= bus
    R_RAM   = 3'd2,   // chip i <= its RAM
    R_UP    = 3'd3,   // chip i <= chip i-1, chip 0 <= bus
    R_DN    = 3'd4,   // chip i <= chip i+1, last chip <= bus
    R_ROT_UP= 3'd5,   // chip i <= chip i-1, chip 0 <= last chip
    R_ROT_DN= 3'd6    // chip i <= chip i+1, last chip <= chip 0
  } rop_e;

  typedef enum logic [1:0] {
    M_NOP = 2'd0,
    M_RD  = 2'd1,     // RAM read  (result to the routing network)
    M_WR  = 2'd2,     // RAM write from the chip read port
    M_WP  = 2'd3      // RAM write of the pattern routed to the chip
  } mop_e;

  // ------------------------------------------------- microinstruction
  typedef struct packed {
    sop_e                 seq_op;    // 4  SEQ
    logic [UAW-1:0]       seq_addr;  // 15 addr (also loop count / CASE base)
    cc_e                  cc;        // 3  CC
    logic                 cc_inv;    // 1
    dop_e                 ds_op;     // 4  DS
    logic [1:0]           ds_ar;     // 2  address register select
    logic [DS_AW-1:0]     ds_addr;   // 12 addr
    logic                 sutr_sel;  // 1  SU/TR shared field: 0 SU, 1 TR
    logic [3:0]           sutr_op;   // 4
    logic [4:0]           sutr_arg;  // 5  shift count / bit number
    bsrc_e                bus_src;   // 3
    rop_e                 drn_op;    // 3
    mop_e                 ram_op;    // 2
    logic [RAM_AW-1:0]    ram_addr;  // 10
    gop_e                 g_op;      // 5  GLITCH
    logic [OFF_W-1:0]     g_off;     // 6  PBL / VSR digit offset
    logic [2*SUB_DIGITS-1:0] g_sub;  // 8  subset CAM pattern
    logic                 tr_rot;    // 1  tag router: close the ring
    logic [6:0]           spare;     // 7
  } uinstr_t;

  localparam uinstr_t UNOP = '0;

endpackage
