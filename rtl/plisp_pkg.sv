// plisp_pkg: types and constants shared by the P.LISP micro-engine.
//
// Words are 64 bits and are numbered the way the processor's register
// descriptions number them: bit 0 is the leftmost (most significant) bit and
// bit 63 the rightmost, so a field written CELL<40:63> is word[40:63] here.
// Every word carries a 4-bit TYPE in bits <0:3>. The field layouts of list
// cells, property-list elements, structure access vectors, the microword
// formats and the register list follow the processor description. The
// numeric type codes, the local-memory address map, the ALU function codes,
// the meaning of the set-conditions and test-conditions fields and the widths
// of the caches are this design's own choices, since the description leaves
// them open.
package plisp_pkg;

  localparam int unsigned W     = 64;   // word width
  localparam int unsigned AW    = 24;   // Mp address width (MAR<0:23>)
  localparam int unsigned UDW   = 16;   // microcode displacement width (UDISP<0:15>)
  localparam int unsigned RAW   = 8;    // local-memory register number width
  localparam int unsigned NFLAG = 20;   // condition flags driven by microword type 5
  localparam int unsigned NEXT_IN = 7;  // external condition inputs seen by type 4

  typedef logic [0:W-1] word_t;

  // ---------------------------------------------------------------- types
  typedef enum logic [3:0] {
    TY_NIL  = 4'd0,
    TY_PTR  = 4'd1,   // type pointer
    TY_CELL = 4'd2,   // list cell
    TY_SAV  = 4'd3,   // structure access vector
    TY_PL   = 4'd4,   // property-list element
    TY_UPC  = 4'd5,   // saved microprogram counter (return address)
    TY_CORK = 4'd6,   // stack marker used by EQUAL
    TY_UC   = 4'd7,   // microcommand (every microword carries it)
    TY_ATOM = 4'd8,
    TY_INT  = 4'd9,   // immediate integer
    TY_TRUE = 4'd10
  } wtype_e;

  // address modes AM1/AM2 (two bits); only IMMEDIATE is referred to by name
  localparam logic [1:0] AM_LISTPTR = 2'd0;
  localparam logic [1:0] AM_ATOMPTR = 2'd1;
  localparam logic [1:0] AM_IMMED   = 2'd3;

  // ------------------------------------------------------ local memory map
  localparam logic [7:0] RA_ZERO  = 8'h00;  // reads 0, writes ignored
  localparam logic [7:0] RA_R1    = 8'h01;
  localparam logic [7:0] RA_R2    = 8'h02;
  localparam logic [7:0] RA_R3    = 8'h03;
  localparam logic [7:0] RA_T1    = 8'h04;
  localparam logic [7:0] RA_T2    = 8'h05;
  localparam logic [7:0] RA_T3    = 8'h06;
  localparam logic [7:0] RA_STACK = 8'h08;  // write pushes, read pops
  localparam logic [7:0] RA_UPC   = 8'h09;  // read gives return address, write jumps
  localparam logic [7:0] RA_SAVCR = 8'h0A;
  localparam logic [7:0] RA_IAR   = 8'h0B;
  localparam logic [7:0] RA_MAR   = 8'h0C;
  localparam logic [7:0] RA_MBR   = 8'h0D;
  localparam logic [7:0] RA_COND  = 8'h0E;  // read-only view of the flags
  localparam logic [7:0] RA_A0    = 8'h10;  // A[0..15]
  localparam logic [7:0] RA_F0    = 8'h20;  // F[0..15]
  localparam logic [7:0] RA_PDT0  = 8'h40;  // PDT[0..63]
  localparam logic [7:0] RA_ODT0  = 8'h80;  // ODT[0..63]

  function automatic logic is_special(input logic [7:0] a);
    return (a == RA_ZERO) || (a == RA_STACK) || (a == RA_UPC) || (a == RA_SAVCR) ||
           (a == RA_IAR) || (a == RA_MAR) || (a == RA_MBR) || (a == RA_COND);
  endfunction

  // ---------------------------------------------------------- ALU functions
  typedef enum logic [4:0] {
    ALU_PASSA = 5'd0,  ALU_PASSB = 5'd1,  ALU_ADD  = 5'd2,  ALU_SUB  = 5'd3,
    ALU_AND   = 5'd4,  ALU_OR    = 5'd5,  ALU_XOR  = 5'd6,  ALU_NOTA = 5'd7,
    ALU_INCA  = 5'd8,  ALU_DECA  = 5'd9,  ALU_SHL  = 5'd10, ALU_SHR  = 5'd11,
    ALU_ASR   = 5'd12, ALU_EQ    = 5'd13, ALU_NEGA = 5'd14
  } alufn_e;

  // ---------------------------------------------------------- microwords
  // OP<0:2> := MW<4:6> selects one of six formats.
  typedef enum logic [2:0] {
    OP_ALU_XFER  = 3'd1,  // ALU op, full-word transfer, indirect transfer
    OP_BYTE_JUMP = 3'd2,  // byte transfer and optional jump
    OP_TWO_XFER  = 3'd3,  // store ALU, two parallel full-word transfers
    OP_TEST_JUMP = 3'd4,  // jump on conditions
    OP_SET_COND  = 3'd5,  // set/reset condition bits
    OP_CMP_JUMP  = 3'd6   // compare immediate byte, jump on (not) equal
  } uop_e;

  // Commands carried in SCF<0:11> of a type-5 microword.
  localparam int unsigned SC_MRD      = 0;  // MBR <- M[MAR]
  localparam int unsigned SC_MWR      = 1;  // M[MAR] <- MBR
  localparam int unsigned SC_UFLUSH   = 2;  // invalidate the microprogram cache
  localparam int unsigned SC_IAR_INC  = 3;
  localparam int unsigned SC_IAR_DEC  = 4;
  localparam int unsigned SC_SAV_POP  = 5;  // COUNTER-1, VECTOR/2
  localparam int unsigned SC_SAV_PSH0 = 6;  // push a 0 (CAR) step
  localparam int unsigned SC_SAV_PSH1 = 7;  // push a 1 (CDR) step
  localparam int unsigned SC_HALT     = 8;
  // SCF<12:31> set flags 0..19, SCF<32:51> reset flags 0..19.
  localparam int unsigned FL_ERROR = 0;    // ERRORFLAG
  localparam int unsigned FL_I     = 1;    // IFLAG

  // Test conditions (type 4): TCF<0> is the sense, TCF<1:35> select these.
  localparam int unsigned NCOND      = 35;
  localparam int unsigned CD_SAVZERO = 20;
  localparam int unsigned CD_LASTBIT = 21;
  localparam int unsigned CD_ALUZERO = 22;
  localparam int unsigned CD_ALUNEG  = 23;
  localparam int unsigned CD_ALUCRY  = 24;
  localparam int unsigned CD_STKEMP  = 25;
  localparam int unsigned CD_STKFUL  = 26;
  localparam int unsigned CD_ALURDY  = 27;
  localparam int unsigned CD_EXT0    = 28;  // 28..34: external inputs

  // One bus transfer as the decoder hands it to the datapath. A full-word
  // transfer is a byte transfer with IBP1=0, IBP2=0, FBP2=63.
  typedef struct packed {
    logic       en;        // write the destination
    logic       src_alu;   // source is the ALU output (S(5))
    logic       src_ind;   // source is M(LOCAL)[IAR]
    logic       dst_ind;   // destination is M(LOCAL)[IAR]
    logic [7:0] src;
    logic [7:0] dst;
    logic [5:0] ibp1;
    logic [5:0] ibp2;
    logic [5:0] fbp2;
  } xfer_t;

  typedef enum logic [1:0] {
    JK_NONE = 2'd0,   // continue at UPC+1
    JK_ALWAYS = 2'd1, // jump to target
    JK_TEST = 2'd2,   // jump if the tested conditions hold
    JK_CMP  = 2'd3    // jump on byte compare result
  } jkind_e;

  typedef struct packed {
    logic             valid;     // TYPE was 'microcommand' and OP known
    logic [2:0]       op;
    xfer_t            bus1;
    xfer_t            bus2;
    logic             alu_go;
    logic [7:0]       alu_a;
    logic [7:0]       alu_b;
    logic [4:0]       alu_fn;
    logic             alu_store; // SALUE: a bus carries the ALU result
    jkind_e           jkind;
    logic [UDW-1:0]   jaddr;
    logic             tsense;    // 0: jump if any selected condition is 1
    logic [NCOND-1:0] tmask;     // tmask[i] selects condition i
    logic             cmp_bus;   // bus of the compare (0: bus1)
    logic [4:0]       cmp_len;   // 1..16
    logic [15:0]      cmp_pat;
    logic             cmp_jeq;   // JC: 1 jump on equal, 0 on not equal
    logic [11:0]      cmd;       // SCF<0:11>, cmd[i] = SCF<i>
    logic [NFLAG-1:0] fset;
    logic [NFLAG-1:0] frst;
    logic             rtb1;
    logic             rtb2;
    logic             ralu;
  } uop_t;

endpackage
