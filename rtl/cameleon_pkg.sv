// cameleon_pkg: shared constants and types of the CAMeleon array.
//
// CAMeleon turns a spintronic Computational RAM (CRAM) into a binary or
// ternary content-addressable memory without changing the cell. The
// defaults below are the evaluated configuration: 1024 keys of 128 bits,
// cut into 16-bit segments, stored in 64x64 tiles, searched with 8-input
// in-array NOR gates. The row layout of a key tile (bit-pairs, reserved
// wildcard bits, preset bits, extra bits) follows the described data layout;
// the exact row numbers and the operation encodings are this design's own.
package cameleon_pkg;

  // Defaults of the evaluated configuration.
  localparam int unsigned DEF_NUM_KEYS   = 1024;
  localparam int unsigned DEF_KEY_BITS   = 128;
  localparam int unsigned DEF_SEG_BITS   = 16;
  localparam int unsigned DEF_TILE_ROWS  = 64;
  localparam int unsigned DEF_TILE_COLS  = 64;
  localparam int unsigned DEF_NOR_INPUTS = 8;

  // One step of a CRAM tile. Every step takes one clock cycle.
  typedef enum logic [1:0] {
    CRAM_NOP   = 2'd0,  // nothing happens
    CRAM_WRITE = 2'd1,  // cells with an active word line take the column's write bit
    CRAM_READ  = 2'd2,  // the column's active cell is sensed onto rdata
    CRAM_LOGIC = 2'd3   // threshold gate from active input cells into the output cell
  } cram_op_e;

  // In-array gates used by regular CRAM commands.
  typedef enum logic {
    GATE_NOR = 1'b0,    // output preset 0, switches to 1 iff all inputs are 0
    GATE_AND = 1'b1     // output preset 1, switches to 0 unless all inputs are 1
  } gate_e;

  // Steps driven onto the key tiles: configuration, key loading and the
  // key-tile stage of a search.
  typedef enum logic [3:0] {
    KS_IDLE,
    KS_INIT,        // entering CAM mode: clear the reserved wildcard rows
    KS_LOAD_ONES,   // key load: write the 1 cells of one key column
    KS_LOAD_ZEROS,  // key load: write the 0 cells of one key column
    KS_PRESET_LO,   // preset the NOR output cells to 0
    KS_PRESET_HI,   // preset the AND output cell to 1
    KS_NOR,         // one NOR per query chunk
    KS_AND,         // AND of the chunk NOR outputs
    KS_READ         // read partial outcomes into the read buffers
  } key_step_e;

  // Steps of the reduction-tile stage of a search.
  typedef enum logic [2:0] {
    RS_IDLE,
    RS_INIT,        // entering CAM mode: clear the constant rows
    RS_PRESET,      // preset the reduction output row to 0
    RS_NOR,         // NOR of the cells enabled by the read buffers
    RS_READ         // read the match bits out
  } red_step_e;

  // Number of query chunks searched one after the other in a key tile.
  function automatic int unsigned num_chunks(int unsigned seg_bits, int unsigned nor_inputs);
    return (seg_bits + nor_inputs - 1) / nor_inputs;
  endfunction

  // Row of the first preset (output) cell of a key tile: after the
  // 2*SEG_BITS bit-pair rows and the SEG_BITS reserved wildcard rows.
  function automatic int unsigned key_preset_row(int unsigned seg_bits);
    return 3 * seg_bits;
  endfunction

  // Row holding a key tile's final partial outcome: the NOR output when the
  // segment is one chunk, otherwise the AND output after the chunk outputs.
  function automatic int unsigned key_result_row(int unsigned seg_bits, int unsigned nor_inputs);
    return (num_chunks(seg_bits, nor_inputs) == 1) ? 3 * seg_bits
                                                   : 3 * seg_bits + num_chunks(seg_bits, nor_inputs);
  endfunction

endpackage
