// sar_pkg: types and constants shared by the SAR image processor blocks.
//
// Samples are complex I/Q pairs, 32-bit signed each, so one sample is a
// 64-bit word and one AXI beat of the 64-bit memory bus (the 8-byte
// sample size follows the 512 MB figure for an 8192 x 8192 segment; the
// fixed-point format is this design's choice). The AXI4 and AXI-Lite
// channels are carried as packed request/response structs so that the
// top level can expose plain struct ports. AXI IDs are not carried: every
// master keeps at most one burst in flight per direction.
package sar_pkg;

  localparam int unsigned SAMPLE_W   = 32;          // bits of I and of Q
  localparam int unsigned ADDR_W     = 32;          // AXI address width
  localparam int unsigned DATA_W     = 64;          // AXI4 data width (one sample)
  localparam int unsigned STRB_W     = DATA_W / 8;
  localparam int unsigned BYTES_PER_SAMPLE = DATA_W / 8;
  localparam int unsigned LITE_DATA_W = 32;
  localparam int unsigned MAX_BURST  = 256;         // AXI4 INCR burst limit (beats)
  localparam int unsigned TW_W       = 18;          // twiddle width (Q1.16)
  localparam int unsigned TW_FRAC    = 16;
  localparam int unsigned REF_FRAC   = 16;          // reference samples are Q15.16

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

  // AXI4 address channel payload (AW and AR share it)
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [7:0]        len;    // beats - 1
    logic [2:0]        size;   // log2(bytes per beat)
    logic [1:0]        burst;  // 2'b01 = INCR
  } axi_ax_t;

  typedef struct packed {
    axi_ax_t           aw;
    logic              aw_valid;
    logic [DATA_W-1:0] w_data;
    logic [STRB_W-1:0] w_strb;
    logic              w_last;
    logic              w_valid;
    logic              b_ready;
    axi_ax_t           ar;
    logic              ar_valid;
    logic              r_ready;
  } axi_req_t;

  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic [1:0]        b_resp;
    logic              b_valid;
    logic              ar_ready;
    logic [DATA_W-1:0] r_data;
    logic [1:0]        r_resp;
    logic              r_last;
    logic              r_valid;
  } axi_resp_t;

  typedef struct packed {
    logic [ADDR_W-1:0]      aw_addr;
    logic                   aw_valid;
    logic [LITE_DATA_W-1:0] w_data;
    logic [3:0]             w_strb;
    logic                   w_valid;
    logic                   b_ready;
    logic [ADDR_W-1:0]      ar_addr;
    logic                   ar_valid;
    logic                   r_ready;
  } axil_req_t;

  typedef struct packed {
    logic                   aw_ready;
    logic                   w_ready;
    logic [1:0]             b_resp;
    logic                   b_valid;
    logic                   ar_ready;
    logic [LITE_DATA_W-1:0] r_data;
    logic [1:0]             r_resp;
    logic                   r_valid;
  } axil_resp_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Register map shared by both accelerators (byte offsets on AXI-Lite).
  // 0x00 CTRL: bit0 start (write 1; reads 1 while busy), bit1 done
  //            (sticky, cleared by the next start), bit2 idle.
  // 0x04 + 4*i: argument i (i = 0 .. NARGS-1), see each accelerator.
  localparam int unsigned HA_NARGS = 6;

  // Round and saturate a wide signed value, shifted right by sh, to SAMPLE_W bits.
  function automatic logic signed [SAMPLE_W-1:0] rnd_sat(input logic signed [71:0] v,
                                                         input int unsigned sh);
    logic signed [71:0] r;
    if (sh == 0) r = v;
    else         r = (v + (72'sd1 <<< (sh - 1))) >>> sh;
    if (r > 72'sd2147483647)       return 32'sh7fffffff;
    else if (r < -72'sd2147483648) return 32'sh80000000;
    else                           return r[SAMPLE_W-1:0];
  endfunction

endpackage
