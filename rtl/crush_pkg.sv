// crush_pkg: types and constants shared by the CRUSH ROBIn FPGA logic.
//
// The CRUSH board stores event fragments arriving over an S-link (Read-Out
// Link) in a ZBT buffer memory, and copies a few words of each fragment plus
// its start address into an "event summary" that the SHARC DSP reads from a
// paged FIFO. This package fixes the word formats and the register map used
// by all blocks.
//
// From the document: 32-bit data words, the 1k x 36 input FIFO, 1 MByte
// (256 kW) buffer, 8-word event summaries, programmable Begin-Of-Fragment
// pattern and programmable word counts for the copied words.
// Own choices: the meaning of the 4 extra FIFO bits, the layout of the 8
// summary words, the number of copied words (4) and the register map.
package crush_pkg;

  localparam int unsigned WORD_W    = 32;  // SHARC / buffer word
  localparam int unsigned SUM_WORDS = 8;   // words per event summary page
  localparam int unsigned N_COPY    = 4;   // programmable copied words per summary
  localparam int unsigned OFS_W     = 8;   // width of one copy offset (word count after BOF)
  localparam int unsigned REG_AW    = 4;   // register address bits

  typedef logic [WORD_W-1:0] word_t;

  // One entry of the 36-bit S-link input FIFO.
  typedef struct packed {
    logic [2:0] spare;  // unused S-link bits, kept in the FIFO
    logic       ctrl;   // S-link control-word flag
    word_t      data;   // 32-bit payload written to the buffer memory
  } slink_word_t;

  // Event summary page, word 0 first.
  //   0: Begin-Of-Fragment word      1: buffer word address of the BOF word
  //   2..5: words copied at the programmed offsets after BOF
  //   6: fragment length in words (bit 31: fragment closed without EOF)
  //   7: End-Of-Fragment word (0 when closed without EOF)
  localparam int unsigned SW_BOF   = 0;
  localparam int unsigned SW_START = 1;
  localparam int unsigned SW_COPY0 = 2;
  localparam int unsigned SW_LEN   = 6;
  localparam int unsigned SW_EOF   = 7;
  typedef logic [SUM_WORDS-1:0][WORD_W-1:0] page_t;

  // Register map (word addresses in the SHARC register window).
  typedef enum logic [REG_AW-1:0] {
    REG_CTRL     = 4'd0,  // [0] enable [1] xoff [2] irq_en [3] match ctrl flag [4] clear (self-clearing)
    REG_BOF_PAT  = 4'd1,
    REG_BOF_MASK = 4'd2,
    REG_EOF_PAT  = 4'd3,
    REG_EOF_MASK = 4'd4,
    REG_COPY_OFS = 4'd5,  // four 8-bit word counts after BOF, copy i in bits [8i+7:8i]; 0 = off
    REG_STATUS   = 4'd6,  // read: see ctrl_regs; write 1 to bits [3:0] clears sticky errors
    REG_WPTR     = 4'd7,  // read: current buffer write address
    REG_FRAGS    = 4'd8   // read: number of summaries produced since clear
  } reg_addr_e;

  // Configuration seen by the datapath.
  typedef struct packed {
    logic                         enable;
    logic                         xoff;
    logic                         irq_en;
    logic                         match_ctrl;
    word_t                        bof_pat;
    word_t                        bof_mask;
    word_t                        eof_pat;
    word_t                        eof_mask;
    logic [N_COPY-1:0][OFS_W-1:0] copy_ofs;
  } cfg_t;

endpackage
