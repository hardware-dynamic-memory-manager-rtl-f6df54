// mm_pkg: types shared by the worst-fit memory manager.
//
// Holds the 2-bit instruction encoding of the coprocessor interface and the
// state type of the control unit's finite-state machine. The four
// instructions and the fifteen state names follow the design; the numeric
// encoding of the instructions (MALLOC=0, FREE=1, WRITE=2, READ=3, in the
// order they are introduced) is this implementation's choice.
package mm_pkg;

  typedef enum logic [1:0] {
    I_MALLOC = 2'd0,
    I_FREE   = 2'd1,
    I_WRITE  = 2'd2,
    I_READ   = 2'd3
  } instr_e;

  typedef enum logic [3:0] {
    S_RESET,
    S_READY,
    S_MEM_READ,
    S_MALLOC,
    S_MALLOC_BIGGER,
    S_WAIT,
    S_FREE_BEGIN,
    S_FREE_PREV_EMPTY,
    S_FREE_PREV_USED,
    S_FREE_PREFIX_MERGE,
    S_FREE_POSTFIX_MERGE,
    S_FREE_MERGES_1,
    S_FREE_MERGES_2,
    S_FREE_MERGES_3,
    S_FREE_END
  } state_e;

endpackage
