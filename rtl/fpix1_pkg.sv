// fpix1_pkg: types and constants shared by the FPIX1 pixel readout chip.
//
// The chip is a 160-row by 18-column array of pixel cells. Each column is
// served by an end-of-column (EOC) logic cell holding four EOC command Sets;
// each Set broadcasts one of four commands (idle, input, output, reset) to
// every pixel of its column. The array size and the four Sets follow the
// chip description; the 8-bit bunch-crossing (BCO) number, the 2-bit command
// encoding and the 16-bit output word layout are choices of this design.
package fpix1_pkg;

  // Array geometry
  localparam int unsigned NROWS    = 160;  // pixel rows per column
  localparam int unsigned NCOLS    = 18;   // columns (one EOC cell each)
  localparam int unsigned NSETS    = 4;    // EOC command Sets per column
  localparam int unsigned ROW_W    = 8;    // row address Radd[7:0]
  localparam int unsigned COL_W    = 5;    // column address
  localparam int unsigned SET_W    = 2;    // Set index
  localparam int unsigned THERM_W  = 3;    // flash ADC comparators / SR flops
  localparam int unsigned ADC_W    = 2;    // encoded ADC value
  localparam int unsigned BCO_W    = 8;    // bunch-crossing number width
  localparam int unsigned CHIPID_W = 7;    // chip identifier width
  localparam int unsigned DOUT_W   = 16;   // off-chip output word

  // Command broadcast by one EOC Set to the pixels of its column
  typedef enum logic [1:0] {
    CMD_IDLE   = 2'd0,
    CMD_INPUT  = 2'd1,
    CMD_OUTPUT = 2'd2,
    CMD_RESET  = 2'd3
  } cmd_e;

  // Word a pixel places on the column bus (thermometer ADC code + row)
  typedef struct packed {
    logic [THERM_W-1:0] therm;
    logic [ROW_W-1:0]   row;
  } pix_word_t;

  // Word an EOC cell places on the chip data bus
  typedef struct packed {
    logic [COL_W-1:0] col;
    logic [ROW_W-1:0] row;
    logic [ADC_W-1:0] adc;
  } hit_word_t;

  // Off-chip output words. Bit 15 tells a header from a hit word.
  //   header: {1'b1, chip_id[6:0], bco[7:0]}
  //   hit   : {1'b0, col[4:0], row[7:0], adc[1:0]}
  function automatic logic [DOUT_W-1:0] header_word(logic [CHIPID_W-1:0] id,
                                                    logic [BCO_W-1:0] bco);
    return {1'b1, id, bco};
  endfunction

  function automatic logic [DOUT_W-1:0] hit_word(hit_word_t h);
    return {1'b0, h};
  endfunction

  // Thermometer code of the flash ADC to a 2-bit count (highest set bit wins)
  function automatic logic [ADC_W-1:0] therm2bin(logic [THERM_W-1:0] t);
    if (t[2])      return 2'd3;
    else if (t[1]) return 2'd2;
    else if (t[0]) return 2'd1;
    else           return 2'd0;
  endfunction

endpackage
