// mp_pkg: types and constants shared by the multiple processor organization.
//
// The machine has n processors P_0..P_{n-1} and 2n memory modules
// M_0..M_{2n-1}. A physical address is {module number, word within module}.
// Module M_{2n-1} belongs to the Processor Interface (PI), which keeps every
// process's communication registers there and runs the process
// communication instructions.
//
// Word and field widths are this design's own choice: 32-bit memory words,
// 16-bit addresses, program counters and A-register contents. The layout of
// a process descriptor (four words: ID, S, PA|CA|Q.Length, Q.Link|INT) and of
// a queued message (S/P | Q.Link | origin address) follows the field order of
// the document's descriptor and message figures; the bit positions are ours.
package mp_pkg;

  localparam int DW    = 32;  // memory word width
  localparam int ADDRW = 16;  // physical address, PC, INT and A-register width

  // One memory reference as it travels on a private path or the shared bus.
  typedef struct packed {
    logic             en;
    logic             we;
    logic [ADDRW-1:0] addr;
    logic [DW-1:0]    wdata;
  } mem_req_t;

  // Relocation modes selected by the processor's microprogram.
  typedef enum logic [1:0] {
    RELOC_ONE_SEG  = 2'd0,  // base + bound check against length
    RELOC_TWO_SEG  = 2'd1,  // first segment in own module, rest in shared modules
    RELOC_ABSOLUTE = 2'd2   // no relocation; privileged references only
  } reloc_mode_e;

  // PI call word, written by P_j into mailbox word I+j of M_{2n-1}:
  //   [31:28] opcode  [27:24] target level i'  [23:16] target processor j'
  //   [15:0]  operand (effective address, level, new register value)
  typedef enum logic [3:0] {
    OP_NOP        = 4'd0,
    OP_PREEMPT    = 4'd1,  // active communication to the process whose ID = S
    OP_SIGNAL     = 4'd2,  // passive communication to the process whose ID = S
    OP_SCHEDULE   = 4'd3,  // put level operand on this processor, drain queue
    OP_LOAD_ID    = 4'd4,  // ID of (i',j') := operand, checked
    OP_LOAD_S     = 4'd5,  // own S := operand
    OP_LOAD_INT   = 4'd6,  // own INT := operand
    OP_SET_ACCEPT = 4'd7,  // own PA := operand[1], CA := operand[0]
    OP_READ_REG   = 4'd8   // return own descriptor word operand[1:0]
  } pi_op_e;

  typedef struct packed {
    pi_op_e           op;
    logic [3:0]       tgt_level;
    logic [7:0]       tgt_proc;
    logic [15:0]      operand;
  } pi_call_t;

  // Completion status returned with the instruction-complete interrupt.
  typedef enum logic [2:0] {
    ST_OK        = 3'd0,  // done (register load, schedule, read)
    ST_DELIVERED = 3'd1,  // message interrupted the receiver at once
    ST_QUEUED    = 3'd2,  // message queued for the receiver
    ST_DENIED    = 3'd3,  // rights check failed
    ST_NOTFOUND  = 3'd4,  // no process has ID = S
    ST_QFULL     = 3'd5,  // no free queue entry
    ST_BADCALL   = 3'd6   // unknown opcode, or no process running on caller
  } pi_status_e;

  // Kinds of interrupt the PI forces on a receiving processor.
  typedef enum logic {
    INT_SIGNAL  = 1'b0,
    INT_PREEMPT = 1'b1
  } int_kind_e;

  // Descriptor word 2: PA | CA | Q.Length
  localparam int PA_BIT = 31;
  localparam int CA_BIT = 30;
  // Descriptor word 3: Q.Link [31:16] | INT [15:0]
  // Message word 0:    S/P [31] | Q.Link [30:16] | origin address [15:0]
  // Message word 1:    preempt address (PC for the receiver)

endpackage
