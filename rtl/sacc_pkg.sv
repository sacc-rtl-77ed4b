// sacc_pkg: types, constants and helper functions shared by the SACC LSTM
// accelerator.
//
// Number format (a design choice; the SACC scheme leaves the data width d_w open):
// weights, biases, inputs, h and c are 16-bit two's-complement fixed point
// with 8 fraction bits (Q8.8). Products are Q16.16 and are accumulated in
// 32-bit signed words (acc_t), which also hold the partial-sum vector s and
// the input projection q = W.x + b. The external bus is 64 bits wide, so one
// bus beat carries four 16-bit words, lowest word in the lowest bits.
package sacc_pkg;

  localparam int DW      = 16;           // data word width d_w
  localparam int FRAC    = 8;            // fraction bits of a data word
  localparam int ACC_W   = 32;           // accumulator / partial-sum width
  localparam int AXI_DW  = 64;           // off-chip bus width
  localparam int AXI_AW  = 32;           // off-chip byte address width
  localparam int WPB     = AXI_DW / DW;  // data words per bus beat
  localparam int NGATE   = 4;            // gates i, f, g, o

  typedef logic signed [DW-1:0]    data_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic [AXI_AW-1:0]       addr_t;
  typedef logic [AXI_DW-1:0]       beat_t;

  // AXI read-address channel payload
  typedef struct packed {
    addr_t      addr;
    logic [7:0] len;    // beats - 1
    logic [2:0] size;   // log2(bytes per beat)
    logic [1:0] burst;  // 2'b01 = INCR
  } axi_ar_t;

  // Convert a Q16.16 accumulator value to Q8.8 with saturation.
  function automatic data_t acc_to_data(input acc_t v);
    acc_t sh;
    sh = v >>> FRAC;
    if (sh > acc_t'(32767))       return data_t'(16'sh7fff);
    else if (sh < -acc_t'(32768)) return data_t'(16'sh8000);
    else                          return data_t'(sh[DW-1:0]);
  endfunction

  // Product of two Q8.8 words, returned in Q8.8 with saturation.
  function automatic data_t mul_q(input data_t a, input data_t b);
    acc_t p;
    p = acc_t'(a) * acc_t'(b);
    return acc_to_data(p);
  endfunction

  // Saturating Q8.8 addition.
  function automatic data_t add_q(input data_t a, input data_t b);
    logic signed [DW:0] s;
    s = {a[DW-1], a} + {b[DW-1], b};
    if (s > 17'sd32767)       return data_t'(16'sh7fff);
    else if (s < -17'sd32768) return data_t'(16'sh8000);
    else                      return data_t'(s[DW-1:0]);
  endfunction

endpackage
