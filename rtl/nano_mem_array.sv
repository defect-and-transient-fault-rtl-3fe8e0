// nano_mem_array: behavioural model of one hybrid CMOS/nanodevice memory
// cell array (a nanowire crossbar with a memory device at each crosspoint).
// It is not synthesizable logic: it stands for the nanodevice layer so that
// the CMOS fault-tolerance logic around it can be simulated.
//
// The address space is the cells that remain after defective nanowires
// have been removed (N_CELLS of them, one bit each).  The model follows the
// document's fault model: a cell is either good or has an open defect,
// which here makes it read back a fixed value whatever was written (the
// stuck value is this model's choice); every read of a good cell is flipped
// with probability tf_ppm per million (transient fault, independent per
// read, drawn from a xorshift32 generator seeded by SEED).  Defects are placed through the def_* port, which stands for
// fabrication; the defect map read port dm_* stands for the result of a
// test of the array, as the allocation procedure assumes a known map.
//
// Timing: writes take effect at the clock edge; reads return rdata one
// cycle after re.  The defect map port reads combinationally.
module nano_mem_array #(
  parameter int unsigned N_CELLS = 262144,
  parameter logic [31:0] SEED    = 32'h1234_5678,
  localparam int unsigned AW     = $clog2(N_CELLS)
) (
  input  logic          clk,
  // cell access
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic          wdata,
  input  logic          re,
  output logic          rdata,
  // defect map (test result)
  input  logic [AW-1:0] dm_addr,
  output logic          dm_defect,
  // defect placement (fabrication)
  input  logic          def_we,
  input  logic [AW-1:0] def_addr,
  input  logic          def_defect,
  input  logic          def_stuck,
  // transient fault rate actually applied, per million reads
  input  logic [19:0]   tf_ppm,
  output logic [31:0]   tf_count
);

  logic store  [N_CELLS];
  logic [31:0] rnd;      // xorshift32 pseudo-random source of transient faults
  logic defect [N_CELLS];
  logic stuck  [N_CELLS];

  initial begin
    for (int i = 0; i < int'(N_CELLS); i++) begin
      store[i]   = 1'b0;
      defect[i] = 1'b0;
      stuck[i]  = 1'b0;
    end
    rdata    = 1'b0;
    rnd      = SEED;
    tf_count = '0;
  end

  function automatic logic [31:0] xorshift(logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    return x ^ (x << 5);
  endfunction

  assign dm_defect = defect[dm_addr];

  always @(posedge clk) begin
    if (def_we) begin
      defect[def_addr] <= def_defect;
      stuck[def_addr]  <= def_stuck;
    end
    if (we && !defect[addr]) store[addr] <= wdata;
    if (re) begin
      rnd <= xorshift(rnd);
      if (defect[addr]) rdata <= stuck[addr];
      else if ((rnd % 1000000) < 32'(tf_ppm)) begin
        rdata    <= !store[addr];
        tf_count <= tf_count + 1;
      end else rdata <= store[addr];
    end
  end

endmodule
