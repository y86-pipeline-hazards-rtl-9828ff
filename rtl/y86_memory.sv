// y86_memory: byte-addressed main memory of the Y86-64 pipeline.
//
// One array of MEM_BYTES bytes seen through three ports:
//   fetch port : combinational read of the 10 bytes starting at fetch_addr
//                (the longest Y86-64 instruction); fetch_err is set when any
//                of them lies outside the array.
//   data port  : combinational little-endian read of the 8 bytes at
//                data_addr; when data_we is set those 8 bytes take data_wdata
//                at the rising clock edge. data_err is set when data_re or
//                data_we is set and the 8 bytes do not all lie inside the
//                array; an erroneous write changes nothing.
//   load port  : one byte per clock written at load_addr when load_we is
//                set, used to place a program before the processor runs.
// Both read ports answer in the same cycle: this is the single-cycle
// ("ideal case") memory that the pipeline assumes. The memory has no reset;
// its contents are whatever was loaded.
//
// The lecture draws an instruction memory and lists memory writes as the
// memory stage's effect but gives no size or organisation. One unified
// array with separate fetch and data ports, its size and the load port are
// this design's own choices.
module y86_memory #(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic        clk,
  // fetch port
  input  logic [63:0] fetch_addr,
  output logic [79:0] fetch_bytes,   // byte i of the instruction in bits 8i+7:8i
  output logic        fetch_err,
  // data port
  input  logic [63:0] data_addr,
  input  logic        data_re,
  input  logic        data_we,
  input  logic [63:0] data_wdata,
  output logic [63:0] data_rdata,
  output logic        data_err,
  // program load port
  input  logic        load_we,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];

  logic fetch_in, data_in;
  assign fetch_in = (fetch_addr < 64'(MEM_BYTES - 9));
  assign data_in  = (data_addr  < 64'(MEM_BYTES - 7));

  always_comb begin
    fetch_bytes = '0;
    data_rdata  = '0;
    for (int i = 0; i < 10; i++)
      if (fetch_in) fetch_bytes[8*i +: 8] = mem[AW'(fetch_addr) + AW'(i)];
    for (int i = 0; i < 8; i++)
      if (data_in) data_rdata[8*i +: 8] = mem[AW'(data_addr) + AW'(i)];
  end

  assign fetch_err = !fetch_in;
  assign data_err  = (data_re || data_we) && !data_in;

  always_ff @(posedge clk) begin
    if (load_we && load_addr < 64'(MEM_BYTES))
      mem[AW'(load_addr)] <= load_data;
    else if (data_we && data_in)
      for (int i = 0; i < 8; i++)
        mem[AW'(data_addr) + AW'(i)] <= data_wdata[8*i +: 8];
  end

endmodule
