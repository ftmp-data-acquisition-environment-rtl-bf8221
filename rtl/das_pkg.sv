// das_pkg: types and constants shared by the FTMP bus data acquisition system (DAS).
//
// The DAS word is one time slice of the 15 monitored FTMP bus lines. Its bit
// assignment follows the document: bit 15 unused, bits 14..10 = P5..P1,
// bits 9..5 = R5..R1, bits 4..0 = T5..T1. The trigger line selection code is
// the bit number of the chosen line in that word, and it also names the paired
// sampling clock (T_nC for T_n, R_nC for R_n, the voted C clock for every P
// line). The 2-bit host function encoding and the csr debug bits are this
// design's own; the ready flag in csr bit 10 is the document's.
package das_pkg;

  typedef logic [15:0] das_word_t;
  typedef logic [3:0]  sel_code_t;

  localparam int unsigned NLINES = 15;   // P1-5, R1-5, T1-5
  localparam int unsigned NCLKS  = 11;   // T1-5C, R1-5C, C

  // Selection codes of Figure 6 (bit number in the DAS word).
  localparam sel_code_t SEL_T1 = 4'd0;
  localparam sel_code_t SEL_NONE = 4'd15;

  // Clock index of the 11-line clock bundle: 0..4 T1C..T5C, 5..9 R1C..R5C, 10 C.
  localparam int unsigned CLK_C = 10;

  // csr bit positions.
  localparam int unsigned CSR_READY   = 10;  // document: ready to down-load
  localparam int unsigned CSR_ARMED   = 8;
  localparam int unsigned CSR_ACQ     = 9;
  localparam int unsigned CSR_DNLOAD  = 11;
  localparam int unsigned CSR_PENDING = 12;

  // Functions the host DMA controller can request.
  typedef enum logic [1:0] {
    FN_LOAD  = 2'd0,   // next three control words: line code, trigger word, count
    FN_START = 2'd1,   // arm the trigger search
    FN_RESET = 2'd2,   // stop and clear, control registers kept
    FN_READ  = 2'd3    // down-load the buffer
  } das_fn_e;

  typedef enum logic [2:0] {
    ST_IDLE,      // waiting for start
    ST_ARMED,     // searching for the trigger word
    ST_ACQ,       // storing time slices
    ST_READY,     // buffer full, ready flag set
    ST_DNLOAD     // words going to the host
  } das_state_e;

  // Clock paired with a selection code; returns NCLKS for the unused code.
  function automatic int unsigned clk_of_sel(sel_code_t s);
    if (s < 4'd10)      return int'(s);
    else if (s < 4'd15) return CLK_C;
    else                return NCLKS;
  endfunction

endpackage
