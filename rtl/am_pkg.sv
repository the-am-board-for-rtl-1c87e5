// am_pkg -- constants and types shared by the AM++ board, the LAMB and the
// associative-memory chip.
//
// Widths that appear on the board drawings are taken as printed: an 18-bit
// road bus (Road-ADD and bitmap words), a 6-bit bitmap (one bit per layer,
// five silicon layers plus the XFT layer) and 4-bit OPCODE buses. Everything
// else here (superstrip width, layer numbering, the OPCODE encoding, the
// split of the 18-bit road address) is this design's own choice.
package am_pkg;

  // Layers: five silicon layers and the drift chamber (XFT) layer.
  localparam int unsigned N_LAYERS   = 6;
  localparam int unsigned LAYER_W    = 3;
  // Superstrip address carried by a hit (assumed width).
  localparam int unsigned SS_W       = 12;
  // Road bus word (Road-ADD or bitmap), 18 bits on the LAMB drawing.
  localparam int unsigned WORD_W     = 18;
  localparam int unsigned BITMAP_W   = N_LAYERS;
  // OPCODE bus width, 4 bits on the GLUE drawing.
  localparam int unsigned OPC_W      = 4;

  // Board organisation.
  localparam int unsigned N_LAMBS    = 4;
  localparam int unsigned N_CHAINS   = 4;   // AM chip pipelines per LAMB
  localparam int unsigned OPC_FIFO_DEPTH = 3; // OPCODE words held by the GLUE

  // The two layers selectable by the 2-bit required_layers word.
  // Bit 0 selects the XFT layer, bit 1 selects the outermost silicon layer.
  localparam int unsigned XFT_LAYER  = 0;
  localparam int unsigned REQ1_LAYER = 5;

  // OPCODE words (encoding assumed). OP_DEC_THR is a two-word OPCODE: the
  // word that follows it carries the new THR value.
  typedef enum logic [OPC_W-1:0] {
    OP_NOP     = 4'h0,
    OP_INIT    = 4'h1,
    OP_DEC_THR = 4'h2
  } opcode_e;

  function automatic bit opc_is_two_word(logic [OPC_W-1:0] w);
    return w == OP_DEC_THR;
  endfunction

  // One hit as it travels on a per-layer bus.
  typedef struct packed {
    logic            valid;
    logic [SS_W-1:0] ss;
  } layer_hit_t;

  // One road-bus beat: the word and the Data Available flag of the sender.
  typedef logic [WORD_W-1:0] word_t;

  // Majority test of one pattern: the number of fired layers must reach
  // THR and every layer enabled by required_layers must have fired.
  function automatic bit road_passes(logic [BITMAP_W-1:0] bm,
                                     logic [3:0]          thr,
                                     logic [1:0]          req);
    int unsigned n;
    n = 0;
    for (int l = 0; l < BITMAP_W; l++) n += int'(bm[l]);
    if (req[0] && !bm[XFT_LAYER])  return 1'b0;
    if (req[1] && !bm[REQ1_LAYER]) return 1'b0;
    return n >= int'(thr);
  endfunction

endpackage
