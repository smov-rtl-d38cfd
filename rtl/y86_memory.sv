// y86_memory: byte-addressed memory holding both the program and its data.
//
// Three ports share one array of MEM_BYTES bytes:
//   * instruction port: returns the IBYTES bytes starting at ipc in the same
//     cycle (combinational), so a whole SMOV instruction (7 bytes, the longest
//     in the ISA) is read at once. Bytes past the end read as zero;
//     imem_error is raised when ipc itself is outside memory.
//   * data port: 32-bit little-endian word at any byte address, read
//     combinationally when dre is high (zero otherwise) and written on the
//     rising clock edge when dwe is high.
//     dmem_error is raised, and a write ignored, when any of the four bytes is
//     outside memory.
//   * host port: one byte read combinationally or written on the clock edge,
//     used to load a program and inspect results. A host write wins over a
//     data write in the same cycle.
// The single-cycle, alignment-free read of a full instruction follows the
// idealised memory of the base Y86 processor; the host port and the sizes are
// choices of this design.
module y86_memory
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 65536,
  parameter int unsigned IBYTES    = 7
) (
  input  logic                 clk,
  // instruction fetch
  input  word_t                ipc,
  output logic [8*IBYTES-1:0]  ibytes,
  output logic                 imem_error,
  // data access
  input  word_t                daddr,
  input  logic                 dre,
  input  logic                 dwe,
  input  word_t                dwdata,
  output word_t                drdata,
  output logic                 dmem_error,
  // host access
  input  word_t                haddr,
  input  logic                 hwe,
  input  logic [7:0]           hwdata,
  output logic [7:0]           hrdata
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];

  // Reads outside memory return zero
  function automatic logic [7:0] rd(word_t a);
    return (a < MEM_BYTES) ? mem[a[AW-1:0]] : 8'h00;
  endfunction

  always_comb begin
    for (int i = 0; i < IBYTES; i++) ibytes[8*i +: 8] = rd(ipc + word_t'(i));
    imem_error = (ipc >= MEM_BYTES);
  end

  always_comb begin
    for (int i = 0; i < 4; i++) drdata[8*i +: 8] = dre ? rd(daddr + word_t'(i)) : 8'h00;
    dmem_error = (daddr > MEM_BYTES - 4);
  end

  assign hrdata = rd(haddr);

  always_ff @(posedge clk) begin
    if (hwe) begin
      if (haddr < MEM_BYTES) mem[haddr[AW-1:0]] <= hwdata;
    end else if (dwe && !dmem_error) begin
      for (int i = 0; i < 4; i++)
        mem[daddr[AW-1:0] + AW'(i)] <= dwdata[8*i +: 8];
    end
  end

endmodule
