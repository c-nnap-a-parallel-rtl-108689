// sat_pkg: types and constants shared by the SAT (Sum And Threshold) processor
// and the C node around it.
//
// The SAT works on 16-bit words over a 16-bit bus: sixteen 16-bit summing
// counters, sixteen class bits per weights word. Those widths follow the
// design description. The 16-bit word address and the layout of the control
// block in buffer memory are this design's own choices; the description only
// says that the buffer memory holds the control information, tuple pointers,
// summed values and recalled patterns.
//
// Control block: CTRL_WORDS consecutive 16-bit words in buffer memory, at the
// address the DSP hands over when it starts the SAT:
//   word  0  flags: bit 0 = also store the stage two summed values,
//                   bits 2:1 = last stage to run (stop_e)
//   word  1  number of stage one tuple pointers (input size / tuple size)
//   word  2  stage one column length (lines per 16-wide column)
//   word  3  stage one weights base offset
//   word  4  number of stage one columns (ceil(class size / 16))
//   word  5  class size (number of stage one summed values thresholded)
//   word  6  L, the number of class bits wanted by L-max thresholding
//   word  7  buffer address of the tuple pointer list
//   word  8  buffer address where the stage one summed values go
//   word  9  buffer address where the class bit addresses go
//   word 10  stage two weights base offset
//   word 11  stage two column length (normally the class size)
//   word 12  number of stage two columns
//   word 13  buffer address where the stage two thresholded words go
//   word 14  buffer address where the stage two summed values go
package sat_pkg;

  localparam int unsigned DW     = 16;  // SAT bus / weights word width
  localparam int unsigned AW     = 16;  // SAT word address width
  localparam int unsigned NCNT   = 16;  // summing counters
  localparam int unsigned CNT_W  = 16;  // width of each summing counter

  typedef logic [DW-1:0]    word_t;
  typedef logic [AW-1:0]    addr_t;
  typedef logic [CNT_W-1:0] cnt_t;

  // Which stage ends the operation.
  typedef enum logic [1:0] {
    STOP_S1_SUM    = 2'd0,
    STOP_S1_THRESH = 2'd1,
    STOP_FULL      = 2'd2
  } stop_e;

  localparam int unsigned CTRL_WORDS = 15;

  typedef struct packed {
    logic  store_s2_sums;
    stop_e stop_after;
    word_t n_tuples;      // 1
    word_t col_len1;      // 2
    addr_t w_off1;        // 3
    word_t n_cols1;       // 4
    word_t class_size;    // 5
    word_t l_bits;        // 6
    addr_t tp_addr;       // 7
    addr_t sv1_addr;      // 8
    addr_t cba_addr;      // 9
    addr_t w_off2;        // 10
    word_t col_len2;      // 11
    word_t n_cols2;       // 12
    addr_t out_addr;      // 13
    addr_t sv2_addr;      // 14
  } ctrl_t;

  // Stage the processor reports in its status.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_LOAD   = 3'd1,
    PH_S1SUM  = 3'd2,
    PH_S1THR  = 3'd3,
    PH_S2     = 3'd4
  } phase_e;

endpackage
