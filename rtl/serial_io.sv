// serial_io: serial register port of the BIST controller (helper).
//
// The published design has a "Controller and Serial I/O" block through
// which the three per-test parameters are loaded; its protocol is not
// given. This is a SPI-style slave (mode 0, MSB first) of this design's own
// definition. sio_cs_n, sio_sclk and sio_sdi are asynchronous to clk and
// pass two-flop synchronizers; each sio_sclk phase (high and low) must
// last at least 4 clk periods.
//
// Frame (cs_n low): 8 header bits {write, 3'b000, addr[3:0]} followed by
// DW (48) data bits. For a write the data bits are shifted in and, after
// the last one, wr_en pulses for one clk cycle with wr_addr/wr_data. For a
// read, rd_addr is valid from the end of the header; rd_data is captured
// on the next clk and shifted out on sio_sdo, changing after each falling
// sclk edge, so the master samples it on the rising edge. Raising cs_n
// aborts the frame.
module serial_io #(
  parameter int unsigned DW = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sio_cs_n,
  input  logic          sio_sclk,
  input  logic          sio_sdi,
  output logic          sio_sdo,
  output logic          wr_en,
  output logic [3:0]    wr_addr,
  output logic [DW-1:0] wr_data,
  output logic [3:0]    rd_addr,
  input  logic [DW-1:0] rd_data
);

  localparam int unsigned FW = 8 + DW;           // frame length
  localparam int unsigned CW = $clog2(FW + 1);

  logic [2:0] cs_sync_q, sclk_sync_q, sdi_sync_q;
  logic       cs_act, sclk_rise, sclk_fall, sdi_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_sync_q   <= '1;
      sclk_sync_q <= '0;
      sdi_sync_q  <= '0;
    end else begin
      cs_sync_q   <= {cs_sync_q[1:0], sio_cs_n};
      sclk_sync_q <= {sclk_sync_q[1:0], sio_sclk};
      sdi_sync_q  <= {sdi_sync_q[1:0], sio_sdi};
    end
  end

  assign cs_act    = ~cs_sync_q[1];
  assign sclk_rise =  sclk_sync_q[1] & ~sclk_sync_q[2];
  assign sclk_fall = ~sclk_sync_q[1] &  sclk_sync_q[2];
  assign sdi_s     =  sdi_sync_q[1];

  logic [7:0]              hdr_q;
  logic [DW-1:0]           sh_in_q, sh_out_q;
  logic [CW-1:0]           cnt_q;
  logic                    load_rd_q;

  assign rd_addr = hdr_q[3:0];
  assign sio_sdo = sh_out_q[DW-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_q     <= '0;
      sh_in_q   <= '0;
      sh_out_q  <= '0;
      cnt_q     <= '0;
      load_rd_q <= 1'b0;
      wr_en     <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
    end else begin
      wr_en     <= 1'b0;
      load_rd_q <= 1'b0;
      if (!cs_act) begin
        cnt_q <= '0;
      end else begin
        if (load_rd_q) sh_out_q <= rd_data;
        if (sclk_rise && cnt_q < CW'(FW)) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q < 8) hdr_q   <= {hdr_q[6:0], sdi_s};
          else           sh_in_q <= {sh_in_q[DW-2:0], sdi_s};
          if (cnt_q == 7) load_rd_q <= 1'b1;
          if (cnt_q == CW'(FW - 1) && hdr_q[7]) begin
            wr_en   <= 1'b1;
            wr_addr <= hdr_q[3:0];
            wr_data <= {sh_in_q[DW-2:0], sdi_s};
          end
        end
        // the first data bit is already on sdo after the header; later bits
        // follow each falling edge inside the data field
        if (sclk_fall && cnt_q > 8) sh_out_q <= {sh_out_q[DW-2:0], 1'b0};
      end
    end
  end

endmodule
