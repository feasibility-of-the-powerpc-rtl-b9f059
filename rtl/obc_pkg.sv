// obc_pkg: types, constants and small functions shared by the support-FPGA
// modules of the PowerPC 603e on-board computer.
//
// Bit numbering. The 603e numbers bits big-endian (bit 0 is the most
// significant). The RTL uses ordinary [N-1:0] vectors, so PowerPC bit k of an
// N-bit field is vector bit N-1-k: A(0-3) is a[31:28], A(29-31) is a[2:0],
// byte lane 0 (D(0-7)) is d[63:56]. Registers documented with big-endian bit
// numbers follow the same rule (bit 0 of an 8-bit register is value 8'h80).
//
// Peripheral bus. Inside the FPGA the memory controller reaches the register
// blocks through a simple one-cycle strobe bus (pbus_req_t). Register data is
// carried MSB-aligned on D(0-31) of the processor bus: an 8-bit register sits in
// wdata[31:24]/rdata[31:24], a 16-bit register in [31:16]. This bus is a choice
// of this design; the document only lists the registers and their addresses.
//
// EDAC code. A (72,64) Hsiao-type SEC-DED Hamming code with eight check bits,
// stored in the 16-bit check-bit memory (upper eight bits unused). The document
// gives the code size and two example codewords (all-zero data has check bits
// 8'h30; data 64'h0000_0080_8080_8080 has check bits 8'hF7), not the matrix.
// The matrix below is this design's: data bit i (LSB numbering) uses the i-th
// weight-3 byte value in ascending order for i < 56 and the (i-56)-th weight-5
// value for i >= 56, with the columns of bits 7 and 24 exchanged so that the
// second example codeword holds; the check bits are inverted by 8'h30 so that
// the first holds.
package obc_pkg;

  // ---------------------------------------------------------------- memory map
  // Regions selected by A(0-3) (Table 3-1).
  typedef enum logic [3:0] {
    RG_SRAM   = 4'h0,
    RG_UART1  = 4'h1,
    RG_UART2  = 4'h2,
    RG_LVDS   = 4'h3,
    RG_SCCA   = 4'h4,
    RG_SCCB   = 4'h5,
    RG_I2C    = 4'h6,
    RG_SYSMGT = 4'h7,
    RG_DEBUG  = 4'h8,
    RG_UNUSED9 = 4'h9,
    RG_UNUSEDA = 4'hA,
    RG_UNUSEDB = 4'hB,
    RG_INTC   = 4'hC,
    RG_UNUSEDD = 4'hD,
    RG_UNUSEDE = 4'hE,
    RG_FLASH  = 4'hF
  } region_e;

  // Cycler flows (Section 3.2.2.1.4).
  typedef enum logic [1:0] {
    FLOW_SRAM_SINGLE = 2'd0,
    FLOW_SRAM_BURST  = 2'd1,
    FLOW_IO_FLASH    = 2'd2,
    FLOW_ERROR       = 2'd3
  } flow_e;

  // Transfer latched by the start-detection module.
  typedef struct packed {
    logic [31:0] addr;     // A(0-31)
    logic [4:0]  tt;       // TT(0-4), tt[4] = TT0
    logic [2:0]  tsiz;     // TSIZ(0-2), tsiz[2] = TSIZ0
    logic        burst;    // TBST asserted
    logic        write;    // write transfer
    logic        addr_only;// address-only transfer (no data tenure)
  } xfer_t;

  // Peripheral strobe bus.
  typedef struct packed {
    logic        wr;       // one-cycle write strobe
    logic        rd;       // one-cycle read strobe (for read side effects)
    logic [3:0]  off;      // register offset, address bits A(24-27)
    logic [31:0] wdata;    // D(0-31)
  } pbus_req_t;

  // ------------------------------------------------------------ 60x bus codes
  // TT(0-4): bit TT3 (tt[1]) set means the transfer has a data tenure, TT1 (tt[3]) set on
  // such a transfer means read.
  // They take the one TT bit they test; the other TT bits only refine the
  // kind of transfer (cache operation, atomic, ...) and do not matter here.
  function automatic logic tt_has_data(input logic tt3);
    return tt3;
  endfunction
  function automatic logic tt_is_read(input logic tt1);
    return tt1;
  endfunction

  // Number of bytes of a single-beat transfer; TSIZ = 000 means eight bytes.
  function automatic logic [3:0] tsiz_bytes(input logic [2:0] tsiz);
    return (tsiz == 3'b000) ? 4'd8 : {1'b0, tsiz};
  endfunction

  // --------------------------------------------------------------------- EDAC
  localparam logic [7:0] EDAC_CHK_INV = 8'h30;

  function automatic logic [7:0] popcount8(input logic [7:0] v);
    logic [7:0] n;
    n = '0;
    for (int k = 0; k < 8; k++) n += {7'd0, v[k]};
    return n;
  endfunction

  typedef logic [7:0] edac_h_t [64];

  // H-matrix columns of the 64 data bits (see the header), built once at
  // elaboration.
  function automatic edac_h_t edac_h_build();
    edac_h_t h;
    int n3, n5;
    logic [7:0] t;
    n3 = 0; n5 = 0;
    for (int v = 0; v < 256; v++) begin
      if (popcount8(8'(v)) == 8'd3) begin
        h[n3] = 8'(v);
        n3++;
      end else if (popcount8(8'(v)) == 8'd5 && n5 < 8) begin
        h[56 + n5] = 8'(v);
        n5++;
      end
    end
    t = h[7]; h[7] = h[24]; h[24] = t;
    return h;
  endfunction

  localparam edac_h_t EDAC_H = edac_h_build();

  function automatic logic [7:0] edac_col(input logic [5:0] i);
    return EDAC_H[i];
  endfunction

  // Raw parity (H times data), before the inversion constant.
  function automatic logic [7:0] edac_parity(input logic [63:0] d);
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < 64; i++) if (d[i]) p ^= edac_col(6'(i));
    return p;
  endfunction

  function automatic logic [7:0] edac_encode(input logic [63:0] d);
    return edac_parity(d) ^ EDAC_CHK_INV;
  endfunction

endpackage
