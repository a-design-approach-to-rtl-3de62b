// fmt_pkg: constants shared by the multispectral data formatter.
//
// The formatter reorders a continuous stream of sensor bytes (for example
// band-interleaved-by-pixel into band-sequential) block by block, using two
// alternating buffer RAMs and a lookup table of read addresses.  The default
// sizes are those of the 100 Mbit/s example application: 8-bit samples and
// 65 536-byte blocks, so 16-bit buffer addresses and a 64K x 16 lookup table.
// The processor register map below is this design's own choice.
package fmt_pkg;

  // Default sizes.
  localparam int unsigned DATA_W_DEF = 8;    // bits per sensor sample
  localparam int unsigned ADDR_W_DEF = 16;   // buffer address bits (64K-byte blocks)
  localparam int unsigned BLK_W_DEF  = 16;   // width of the block counter

  // Processor register map.  The processor address bus is ADDR_W+1 bits wide:
  // with the top bit clear the address selects a lookup-table word, with it
  // set the low bits select one of these programmable-I/O registers.
  typedef enum logic [1:0] {
    REG_FINAL_ADDR = 2'd0,  // address of the last byte of a block (M)
    REG_NUM_BLOCKS = 2'd1,  // number of blocks to format
    REG_STATUS     = 2'd2   // read only: {irq, out_status, in_status}
  } reg_sel_e;

endpackage
