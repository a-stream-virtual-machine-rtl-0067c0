// sm_pkg: types and constants shared by the Smart Memories stream-tile RTL.
//
// A memory mat is a 4 kB SRAM (1024 words of 32 bits) with a few meta-data
// bits kept beside every word. The mat's role (scratch SRAM, FIFO, cache tag
// or cache data) is set by its configuration; the operations a requester can
// issue to a mat are listed in mat_op_e. The three safe operations implement
// single-word locks on meta-data bit META_SAFE. Word counts and the mat size
// follow the Smart Memories description; the encodings are this design's own.
package sm_pkg;

  localparam int unsigned WORD_W     = 32;    // mat word width
  localparam int unsigned MAT_WORDS  = 1024;  // 4 kB per mat
  localparam int unsigned MAT_AW     = 10;    // word address inside a mat
  localparam int unsigned META_W     = 2;     // meta-data bits per word
  localparam int unsigned META_SAFE  = 0;     // lock bit (scratch mode)
  localparam int unsigned META_VALID = 0;     // valid bit (tag mode)
  localparam int unsigned META_USED  = 1;     // replacement hint (tag mode)
  localparam int unsigned NUM_MATS   = 16;    // mats per tile

  // Role of a memory mat.
  typedef enum logic [1:0] {
    MAT_SRAM = 2'd0,   // scratch memory, safe operations allowed
    MAT_FIFO = 2'd1,   // one 1024-word or two 512-word FIFOs
    MAT_TAG  = 2'd2,   // cache tag array: compare and valid bit
    MAT_DATA = 2'd3    // cache data array: read gated by a tag hit
  } mat_mode_e;

  // Operation presented to a mat.
  typedef enum logic [3:0] {
    OP_RD      = 4'd0,  // plain load
    OP_WR      = 4'd1,  // plain store
    OP_SAFE_LD = 4'd2,  // stall unless safe bit set; clears it
    OP_SAFE_ST = 4'd3,  // stall while safe bit set; sets it and writes
    OP_ASAFE_ST= 4'd4,  // never stalls; sets safe bit and writes if clear
    OP_PUSH    = 4'd5,  // FIFO push
    OP_POP     = 4'd6,  // FIFO pop
    OP_TAG_LK  = 4'd7,  // tag lookup: compare stored tag with wdata
    OP_TAG_WR  = 4'd8   // tag fill: write tag, set valid
  } mat_op_e;

  // DMA addressing modes.
  typedef enum logic [1:0] {
    DMA_BLOCK   = 2'd0,  // one contiguous block
    DMA_STRIDED = 2'd1,  // records of RECORD words, STRIDE words apart
    DMA_INDEXED = 2'd2   // record positions read from a local index list
  } dma_mode_e;

  // DMA configuration register map (word offsets inside a channel).
  typedef enum logic [3:0] {
    DREG_EXT_ADDR  = 4'd0,  // external (off-tile) word address
    DREG_LOC_ADDR  = 4'd1,  // local (tile) word address
    DREG_REC_WORDS = 4'd2,  // words per record
    DREG_STRIDE    = 4'd3,  // words between record starts (strided mode)
    DREG_NUM_RECS  = 4'd4,  // number of records
    DREG_IDX_ADDR  = 4'd5,  // local address of the index list
    DREG_DONE_ADDR = 4'd6,  // address of the completion write
    DREG_DONE_DATA = 4'd7,  // data of the completion write
    DREG_CTRL      = 4'd8   // control: writing start=1 launches the transfer
  } dma_reg_e;

  // Layout of the DMA control register.
  typedef struct packed {
    logic [20:0] rsvd;
    logic [3:0]  done_op;   // mat_op_e of the completion write
    logic        done_en;   // issue the completion write
    logic        to_ext;    // 1: tile -> outside, 0: outside -> tile
    logic [1:0]  mode;      // dma_mode_e
    logic [2:0]  rsvd2;
    logic        start;
  } dma_ctrl_t;

endpackage
