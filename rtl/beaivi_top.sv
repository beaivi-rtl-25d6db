// Beaivi DSP subsystem: the dual-mode core with its 64 kB instruction and
// 64 kB data scratchpads.
//
// The host port loads programs and data and reads results: host_sel picks the
// instruction memory (64-bit words, byte address bits [15:3]) or the data
// memory (32-bit words, byte address bits [15:2], byte enables). Read data is
// returned one cycle after a request. The core runs while "run" is high and
// is held in reset otherwise, so a program is loaded with run low and started
// by raising it (the core leaves reset one cycle later); execution begins in RISC-V mode at address 0. The host port
// stands in for the subsystem's AXI-slave/JTAG program-loading path, whose
// protocol is not part of this design. Event strobes of the core are brought
// out for observation.
//
// With bank_sel high the core fetches from a 128-byte instruction register
// bank and its load-store unit uses a 512-byte data register bank instead of
// the scratchpads (addresses wrap inside the banks), and the host port reads
// and writes the banks. The document places such banks next to the SRAMs
// for test and debug; selecting them with a pin is this design's choice.
module beaivi_top
  import beaivi_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 8192,    // 64 kB of 64-bit words
  parameter int unsigned DMEM_WORDS = 16384,   // 64 kB of 32-bit words
  parameter int unsigned IBANK_WORDS = 16,     // 128 B instruction register bank
  parameter int unsigned DBANK_WORDS = 128     // 512 B data register bank
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        bank_sel,     // 1: run from the test register banks (change only while run is low)
  // host access
  input  logic        host_req,
  input  logic        host_we,
  input  logic        host_sel,     // 0: instruction memory, 1: data memory
  input  logic [15:0] host_addr,    // byte address
  input  logic [3:0]  host_be,      // data memory byte enables
  input  logic [63:0] host_wdata,
  output logic [63:0] host_rdata,
  // status
  output logic        rv_mode,
  output logic        ev_bypass,
  output logic        ev_stall,
  output logic        ev_flush,
  output logic        ev_mode_switch,
  output logic        ev_dict_header,
  output logic        ev_dict_fill,
  output logic        ev_compressed,
  output logic        ev_guard_off
);
  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  logic           core_rst_n;
  logic [IAW-1:0] imem_addr;
  logic [63:0]    imem_rdata, imem_b_rdata;
  logic           dmem_req, dmem_we;
  logic [DAW-1:0] dmem_addr;
  logic [3:0]     dmem_be;
  logic [31:0]    dmem_wdata, dmem_rdata, dmem_b_rdata;
  logic [1:0]     sel_q;
  logic [63:0]    ibank_rdata, ibank_b_rdata;
  logic [31:0]    dbank_rdata, dbank_b_rdata, sram_rdata;

  // the core reset follows "run" through a flop, so it is released in step
  // with the clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) core_rst_n <= 1'b0;
    else        core_rst_n <= run;
  end

  beaivi_core #(.IAW(IAW), .DAW(DAW)) u_core (
    .clk, .rst_n(core_rst_n),
    .imem_addr, .imem_rdata(bank_sel ? ibank_rdata : imem_rdata),
    .dmem_req, .dmem_we, .dmem_addr, .dmem_be, .dmem_wdata, .dmem_rdata,
    .rv_mode, .ev_bypass, .ev_stall, .ev_flush, .ev_mode_switch,
    .ev_dict_header, .ev_dict_fill, .ev_compressed, .ev_guard_off
  );

  beaivi_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .a_addr(imem_addr), .a_rdata(imem_rdata),
    .b_req(host_req && !host_sel && !bank_sel), .b_we(host_we), .b_addr(host_addr[IAW+2:3]),
    .b_wdata(host_wdata), .b_rdata(imem_b_rdata)
  );

  beaivi_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .a_req(dmem_req && !bank_sel), .a_we(dmem_we), .a_addr(dmem_addr), .a_be(dmem_be),
    .a_wdata(dmem_wdata), .a_rdata(sram_rdata),
    .b_req(host_req && host_sel && !bank_sel), .b_we(host_we), .b_addr(host_addr[DAW+1:2]),
    .b_be(host_be), .b_wdata(host_wdata[31:0]), .b_rdata(dmem_b_rdata)
  );

  // test register banks: 128 B of instructions, 512 B of data; addresses
  // wrap around inside them
  beaivi_regbank #(.W(64), .WORDS(IBANK_WORDS)) u_ibank (
    .clk, .rst_n,
    .a_req(bank_sel), .a_we(1'b0), .a_addr(imem_addr[$clog2(IBANK_WORDS)-1:0]), .a_be('1),
    .a_wdata('0), .a_rdata(ibank_rdata),
    .b_req(host_req && !host_sel && bank_sel), .b_we(host_we),
    .b_addr(host_addr[$clog2(IBANK_WORDS)+2:3]), .b_be('1), .b_wdata(host_wdata),
    .b_rdata(ibank_b_rdata)
  );

  beaivi_regbank #(.W(32), .WORDS(DBANK_WORDS)) u_dbank (
    .clk, .rst_n,
    .a_req(dmem_req && bank_sel), .a_we(dmem_we), .a_addr(dmem_addr[$clog2(DBANK_WORDS)-1:0]),
    .a_be(dmem_be), .a_wdata(dmem_wdata), .a_rdata(dbank_rdata),
    .b_req(host_req && host_sel && bank_sel), .b_we(host_we),
    .b_addr(host_addr[$clog2(DBANK_WORDS)+1:2]), .b_be(host_be), .b_wdata(host_wdata[31:0]),
    .b_rdata(dbank_b_rdata)
  );

  assign dmem_rdata = bank_sel ? dbank_rdata : sram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sel_q <= 2'b00;
    else if (host_req) sel_q <= {bank_sel, host_sel};
  end
  always_comb begin
    unique case (sel_q)
      2'b00:   host_rdata = imem_b_rdata;
      2'b01:   host_rdata = {32'd0, dmem_b_rdata};
      2'b10:   host_rdata = ibank_b_rdata;
      default: host_rdata = {32'd0, dbank_b_rdata};
    endcase
  end
endmodule
