// srec_prog: S-record programmer that loads code into the SRAM over UART 1.
//
// A UART receiver feeds ASCII characters to the S-record decoder, which parses
// "S<t><count><address><data...><checksum>" records (S1/S2/S3 carry 16/24/32
// bit addresses and data; S0, S5 and S7-S9 are parsed and their data
// ignored; characters between records, such as CR and LF, are skipped). For
// every data byte the state machine writes the SRAM: it reads the 64-bit word
// holding the byte (one clock), then writes the word back with the byte
// merged and check bits recomputed (one clock), so the EDAC check bits stay
// valid. The record checksum (one's complement of the byte sum) is checked at
// the end of each record; a mismatch sets chk_err and counts in err_count.
// A termination record (S7/S8/S9) sets done.
//
// SRAM interface: word address sram_a (A(11-28) of the byte address),
// active-low chip select, output enable and byte-lane write enables (bwe_n[7]
// is byte lane 0), 64 data bits and 8 check bits (upper 8 of the 16-bit check
// field written as zero). The baud rate is f_clk / (16 (UBRR + 1)).
//
// The UART, S-record decoder and state machine that toggles chip select and
// write enable follow the document's block diagram; the read-merge-write with
// check bits, the checksum handling and the record types accepted are this
// design's.
//
// The receiver's ninth data bit (rx_data[8]) is unused: S-records are 8-bit
// characters.
module srec_prog
  import obc_pkg::*;
#(
  parameter logic [7:0] UBRR = 8'h30
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rxd,
  output logic [17:0] sram_a,
  output logic        sram_cs_n,
  output logic        sram_oe_n,
  output logic [7:0]  sram_bwe_n,
  output logic [63:0] sram_d_o,
  input  logic [63:0] sram_d_i,
  output logic [15:0] sram_c_o,
  output logic        sram_cwe_n,
  output logic        done,
  output logic        chk_err,
  output logic [15:0] rec_count,
  output logic [15:0] byte_count,
  output logic [15:0] err_count
);

  typedef enum logic [3:0] {
    P_WAIT_S, P_TYPE, P_COUNT, P_ADDR, P_DATA, P_SUM, P_WR_RD, P_WR_WR
  } pstate_e;

  logic [7:0]  div;
  logic        tick16, rx_valid, rx_fe;
  logic [8:0]  rx_data;
  logic [7:0]  ch;
  logic [3:0]  nib;
  logic        is_hex;
  pstate_e     st;
  logic [3:0]  rtype;
  logic        hi;          // high nibble of a byte is pending
  logic [3:0]  hi_nib;      // first hex digit of the byte being assembled
  logic [7:0]  count;       // bytes left in record (address+data+checksum)
  logic [2:0]  addr_bytes, addr_left;
  logic [31:0] addr;
  logic [7:0]  sum;
  logic [7:0]  wbyte;
  logic [63:0] word_q;
  logic [63:0] merged;

  always_ff @(posedge clk) begin
    if (rst || div >= UBRR) div <= '0;
    else div <= div + 8'd1;
  end
  assign tick16 = (div >= UBRR);

  uart_rx u_rx (
    .clk, .rst, .tick16, .en(1'b1), .nine(1'b0), .rxd,
    .valid(rx_valid), .data(rx_data), .frame_err(rx_fe)
  );

  assign ch = rx_data[7:0];
  always_comb begin
    is_hex = 1'b1;
    nib    = '0;
    if (ch >= "0" && ch <= "9")      nib = 4'(ch - "0");
    else if (ch >= "A" && ch <= "F") nib = 4'(ch - "A" + 8'd10);
    else if (ch >= "a" && ch <= "f") nib = 4'(ch - "a" + 8'd10);
    else is_hex = 1'b0;
  end

  // byte lane of the byte at addr: lane k = addr[2:0], vector byte 7-k
  always_comb begin
    merged = word_q;
    merged[8*(7 - int'(addr[2:0])) +: 8] = wbyte;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= P_WAIT_S; rtype <= '0; hi <= 1'b1; hi_nib <= '0; count <= '0;
      addr_bytes <= '0; addr_left <= '0; addr <= '0; sum <= '0; wbyte <= '0;
      word_q <= '0; done <= 1'b0; chk_err <= 1'b0;
      rec_count <= '0; byte_count <= '0; err_count <= '0;
    end else begin
      unique case (st)
        P_WR_RD: begin
          word_q <= sram_d_i;
          st     <= P_WR_WR;
        end
        P_WR_WR: begin
          addr       <= addr + 32'd1;
          byte_count <= byte_count + 16'd1;
          st         <= (count == 8'd2) ? P_SUM : P_DATA;
          count      <= count - 8'd1;
        end
        default: if (rx_valid && !rx_fe) begin
          if (st == P_WAIT_S) begin
            if (ch == "S") st <= P_TYPE;
          end else if (st == P_TYPE) begin
            rtype <= nib;
            addr_bytes <= (nib == 4'd2 || nib == 4'd8) ? 3'd3 :
                          (nib == 4'd3 || nib == 4'd7) ? 3'd4 : 3'd2;
            hi  <= 1'b1;
            sum <= '0;
            st  <= is_hex ? P_COUNT : P_WAIT_S;
          end else if (!is_hex) begin
            st <= P_WAIT_S;                       // malformed record
          end else if (hi) begin
            hi_nib <= nib;
            hi    <= 1'b0;
          end else begin
            // a full byte: {hi_nib, nib}
            hi  <= 1'b1;
            sum <= sum + {hi_nib, nib};
            unique case (st)
              P_COUNT: begin
                count     <= {hi_nib, nib};
                addr      <= '0;
                addr_left <= addr_bytes;
                st        <= P_ADDR;
              end
              P_ADDR: begin
                addr      <= {addr[23:0], hi_nib, nib};
                count     <= count - 8'd1;
                addr_left <= addr_left - 3'd1;
                if (addr_left == 3'd1) st <= (count == 8'd2) ? P_SUM : P_DATA;
              end
              P_DATA: begin
                if (rtype inside {4'd1, 4'd2, 4'd3}) begin
                  wbyte <= {hi_nib, nib};
                  st    <= P_WR_RD;
                end else begin
                  count <= count - 8'd1;
                  if (count == 8'd2) st <= P_SUM;
                end
              end
              P_SUM: begin
                rec_count <= rec_count + 16'd1;
                if ((sum + {hi_nib, nib}) != 8'hFF) begin
                  chk_err   <= 1'b1;
                  err_count <= err_count + 16'd1;
                end
                if (rtype inside {4'd7, 4'd8, 4'd9}) done <= 1'b1;
                st <= P_WAIT_S;
              end
              default: st <= P_WAIT_S;
            endcase
          end
        end
      endcase
    end
  end

  // In P_WR_WR count still includes the byte being written plus the checksum,
  // so count == 2 there means the checksum is next.
  assign sram_a     = addr[20:3];
  assign sram_cs_n  = !(st == P_WR_RD || st == P_WR_WR);
  assign sram_oe_n  = !(st == P_WR_RD);
  assign sram_bwe_n = (st == P_WR_WR) ? 8'h00 : 8'hFF;
  assign sram_cwe_n = !(st == P_WR_WR);
  assign sram_d_o   = merged;
  assign sram_c_o   = {8'h00, edac_encode(merged)};

endmodule
