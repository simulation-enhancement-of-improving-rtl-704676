// hd_pkg: types and constants shared by the Hamming-protected trace buffer.
//
// The code is the (12,8) Hamming code with the lexicographic parity-check
// matrix: column j of H is the 4-bit binary value of j (j = 1..12), so a
// syndrome equals the position of a single flipped bit. Check bits sit at the
// powers of two (1, 2, 4, 8); the data bits fill positions 3,5,6,7,9,10,11,12.
// A codeword is held as logic [1:12] so that index i is code position i and a
// literal such as 12'b100010101100 reads left to right from position 1.
// A data byte d[7:0] is placed with its most significant bit at position 3 and
// its least significant bit at position 12. (The ascending range is on
// purpose, so verilator's ASCRANGE style warning on code_t stands.)
package hd_pkg;

  localparam int unsigned DATA_W = 8;   // k, information bits
  localparam int unsigned CODE_W = 12;  // n, codeword bits
  localparam int unsigned SYN_W  = 4;   // check bits / syndrome width

  typedef logic [1:CODE_W]   code_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [SYN_W-1:0]  syn_t;   // {s8, s4, s2, s1}

  // Code position of data bit d[i].
  function automatic int unsigned data_pos(int unsigned i);
    case (i)
      7: return 3;
      6: return 5;
      5: return 6;
      4: return 7;
      3: return 9;
      2: return 10;
      1: return 11;
      default: return 12;
    endcase
  endfunction

  // Decoder verdict on one received word.
  typedef enum logic [1:0] {
    DEC_OK        = 2'd0,  // syndrome 0000
    DEC_CORRECTED = 2'd1,  // syndrome 0001..1100: one bit flipped back
    DEC_DETECTED  = 2'd2   // syndrome 1101..1111: adjacent error, not corrected
  } dec_status_t;

  // Pattern of glitches the injector applies.
  typedef enum logic [1:0] {
    GL_NONE   = 2'd0,
    GL_SINGLE = 2'd1,  // one bit at the chosen position
    GL_DOUBLE = 2'd2,  // two adjacent bits starting at the position
    GL_TRIPLE = 2'd3   // three adjacent bits starting at the position
  } glitch_mode_t;

  // One entry of the error memory.
  typedef struct packed {
    logic [7:0]  addr;       // trace-buffer address of the damaged word
    syn_t        syndrome;   // decoder syndrome {s8,s4,s2,s1}
    dec_status_t status;     // decoder verdict
    logic        onehot_ok;  // decoded byte was one-hot
    logic        post_trig;  // word was captured after the trigger fired
  } err_rec_t;

  // Frequency selection shared by the clock divider users:
  // 0 = system clock, k = frequency_k (system clock / 2^k), k = 1..4.
  typedef logic [2:0] freq_sel_t;

endpackage
