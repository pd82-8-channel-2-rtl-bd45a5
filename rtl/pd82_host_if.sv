// pd82_host_if: capture of host register writes.
//
// The host writes by holding address and data on the bus with the active-low chip enable
// (ce_n) and write enable (we_n) both low. During the write window of each channel slot
// (slot cycles 5 through 22) the bus is sampled every clock; a sample with ce_n and we_n
// low records the address and data, a later one in the same window overwriting it. In
// slot cycle 23 a recorded write is presented on wr_valid/wr_addr/wr_data for that one
// cycle and the record is cleared. At most one write per 26-cycle slot is therefore taken,
// and a write that is not held long enough to overlap a window is lost: this is the
// document's scheme. The bus is sampled without a synchronizer, also as in the document,
// so the host must hold it stable while ce_n and we_n are low.
module pd82_host_if
  import pd82_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] cyc,
  input  logic       ce_n,
  input  logic       we_n,
  input  logic [3:0] address,
  input  logic [7:0] data,
  output logic       wr_valid,
  output logic [3:0] wr_addr,
  output logic [7:0] wr_data
);

  logic       pending;
  logic       window;

  assign window   = (cyc >= 5'(CYC_WR_FIRST)) && (cyc <= 5'(CYC_WR_LAST));
  assign wr_valid = pending && (cyc == 5'(CYC_WR_APPLY));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else if (window && !ce_n && !we_n) begin
      pending <= 1'b1;
      wr_addr <= address;
      wr_data <= data;
    end else if (wr_valid) begin
      pending <= 1'b0;
    end
  end

endmodule
