// config_loader: streams one configuration bitstream into the compute FPGA.
//
// The document places a small controller next to the compute FPGA that
// addresses the configuration memory itself, so that the FPGA spends no I/O
// on it. This block is that function: after start it reads LEN consecutive
// bytes from base onward, one per clock, and presents each on the
// configuration port the cycle after its read (cfg_valid, cfg_byte), marking
// the first byte (cfg_first). done pulses with the last byte. A
// reconfiguration therefore takes LEN+1 clocks. start is ignored while busy.
module config_loader #(
  parameter int unsigned LEN = 65,    // bytes per bitstream
  parameter int unsigned AW  = 10     // configuration memory address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  output logic          busy,
  output logic          done,
  // configuration memory read port
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr,
  input  logic [7:0]    mem_rd_data,
  // configuration port of the compute FPGA
  output logic          cfg_valid,
  output logic          cfg_first,
  output logic [7:0]    cfg_byte
);

  localparam int unsigned LW = $clog2(LEN + 1);

  logic [AW-1:0] addr;
  logic [LW-1:0] cnt;
  logic          first_d;
  logic          last_d;

  assign mem_rd_en   = busy;
  assign mem_rd_addr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      addr      <= '0;
      cnt       <= '0;
      cfg_valid <= 1'b0;
      first_d   <= 1'b0;
      last_d    <= 1'b0;
    end else begin
      cfg_valid <= busy;
      first_d   <= busy && (cnt == '0);
      last_d    <= busy && (cnt == LW'(LEN - 1));
      if (busy) begin
        addr <= addr + 1'b1;
        cnt  <= cnt + 1'b1;
        if (cnt == LW'(LEN - 1)) busy <= 1'b0;
      end else if (start) begin
        busy <= 1'b1;
        addr <= base;
        cnt  <= '0;
      end
    end
  end

  assign cfg_first = first_d;
  assign cfg_byte  = mem_rd_data;
  assign done      = last_d;

endmodule
