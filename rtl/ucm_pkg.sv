// ucm_pkg: types and constants shared by the universal computation module (UCM).
//
// A UCM is a small shared-memory processor: up to MAX_PE bit-serial processing
// elements (PEs), two register banks of MAX_PE word registers each (R1.x next
// to RAM1, R2.x next to RAM2), two RAMs and a microprogrammed control unit.
// Every clock the control unit issues one control vector, ucm_ctl_t, that
// sets every multiplexer and enable in the module. The word width of 16 bits,
// the three RAM words per bank and the limit of three PEs follow the document;
// the field layout of the control vector, the control-memory depth and the
// sequencing fields (serial, jump, stop, target) are this design's own choice.
//
// Register numbering used by every select field: bank b (0 = R1, 1 = R2),
// slot s (0 = Rx.1 ...) has index b*MAX_PE + s, so R1.1=0, R1.2=1, R1.3=2,
// R2.1=3, R2.2=4, R2.3=5.
package ucm_pkg;

  localparam int W          = 16;  // data word width (bits)
  localparam int MAX_PE     = 3;   // most PEs a UCM can hold
  localparam int NREG       = 2 * MAX_PE;
  localparam int RAM_DEPTH  = 3;   // words per RAM (RAM1[0..2], RAM2[0..2])
  localparam int RAM_AW     = 2;
  localparam int CM_DEPTH   = 32;  // control-memory words
  localparam int CM_AW      = $clog2(CM_DEPTH);
  localparam int REG_SELW   = $clog2(NREG);
  localparam int SLOT_SELW  = $clog2(MAX_PE);
  localparam int PE_SELW    = $clog2(MAX_PE + 1);

  // What a word register does in one clock.
  typedef enum logic [1:0] {
    R_HOLD     = 2'd0,  // keep the word
    R_SHIFT    = 2'd1,  // shift right: LSB goes out to the ICN, MSB comes from sin_sel
    R_LOAD_RAM = 2'd2,  // parallel load from the bank's RAM read port
    R_LOAD_IN  = 2'd3   // parallel load from the bank's external input IN_b
  } reg_mode_e;

  // Operation of a bit-serial PE over one W-clock serial step.
  typedef enum logic [1:0] {
    PE_ADD = 2'd0,  // a + b
    PE_SUB = 2'd1,  // a + not(b) + 1  (a - b)
    PE_MUL = 2'd2,  // a * b, low W bits of the product
    PE_NEG = 2'd3   // not(a) + 1      (-a)
  } pe_op_e;

  typedef struct packed {
    reg_mode_e             mode;
    logic [PE_SELW-1:0]    sin_sel;  // serial input: 0 = own LSB (rotate), k = PE k
  } reg_ctl_t;

  typedef struct packed {
    pe_op_e                op;
    logic [REG_SELW-1:0]   src_a;    // register feeding input a
    logic [REG_SELW-1:0]   src_b;    // register feeding input b
  } pe_ctl_t;

  typedef struct packed {
    logic                  we;       // write RAM[addr] from register wsrc of the bank
    logic [RAM_AW-1:0]     addr;     // read and write address
    logic [SLOT_SELW-1:0]  wsrc;     // slot of the bank register that is written
  } ram_ctl_t;

  typedef struct packed {
    logic                  we;       // load the output register OUT_b
    logic [REG_SELW-1:0]   sel;      // from this word register
  } out_ctl_t;

  // One control vector. A word with serial=1 is issued for W clocks in a row
  // (one bit-serial operation); any other word lasts one clock.
  typedef struct packed {
    logic                  serial;
    logic                  jump;     // next word is target instead of pc+1
    logic                  stop;     // the program ends after this word
    logic [CM_AW-1:0]      target;
    logic [1:0]            aux;      // free bits for logic around the UCM
    out_ctl_t [1:0]        outp;     // [0] = OUT_1, [1] = OUT_2
    ram_ctl_t [1:0]        ram;      // [0] = RAM1,  [1] = RAM2
    pe_ctl_t  [MAX_PE-1:0] pe;
    reg_ctl_t [NREG-1:0]   regs;
  } ucm_ctl_t;

  typedef ucm_ctl_t [CM_DEPTH-1:0] ucm_prog_t;


  // Register index of bank b (0 or 1), slot s (0-based).
  function automatic logic [REG_SELW-1:0] ridx(int b, int s);
    return REG_SELW'(b * MAX_PE + s);
  endfunction

endpackage
