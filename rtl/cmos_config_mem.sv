// cmos_config_mem: the CMOS memory that holds the configuration of every
// nanodevice memory segment, indexed by logical block address.
//
// In the two-level scheme an entry is the segment head, stored as the head
// address divided by the alignment constant (the head is always a
// multiple of it, so the low bits are not kept), and the 3-bit designation
// of the BCH code chosen for the segment: ceil(log2 N) - log2(ALIGN) +
// ceil(log2 h) bits, 12 + 3 = 15 bits for a 512 x 512 array aligned to 64.
// CMOS memory is assumed fault free.  The count register holds how many
// entries are valid.  One write port (allocation), one synchronous read
// port (access, data one cycle after raddr).  Entry format and ports are
// this design's choice; the content follows the document.
module cmos_config_mem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 15,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          clear,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  output logic [AW:0]   count
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  // number of valid entries: allocation writes them in order from 0
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (clear)  count <= '0;
    else if (we)     count <= (AW+1)'(waddr) + 1'b1;
  end

endmodule
