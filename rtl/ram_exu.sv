// ram_exu: on-chip data RAM execution unit (RAM_1: 1238 words, RAM_2: 1030
// words, 16 bits each).
//
// An address register file (NA registers, loaded from the low 12 bits of
// BUS_1 or BUS_2) and a write-data register file (ND registers) sit in front
// of a single-port memory. Every cycle the read register loads the word at
// A[ra]; it drives the buses in the next cycle, so a read has one cycle of
// latency. When `we` is high the word D[rd] is written to A[ra] instead at
// the same edge (the read register then loads the old word).
// A host port (`ext_*`) takes over the memory while the processor is idle:
// it addresses the memory directly and its reads land in the same read
// register. Addresses at or above WORDS write nothing and read 0.
// Sizes and register-file sizes (RAM_1: 2 and 4, RAM_2: 1 and 2) are the
// design's; reading which of the two register files holds addresses, the
// always-read timing and the host port are this design's choices.
module ram_exu
  import edm_pkg::*;
#(
  parameter int unsigned WORDS = RAM1_WORDS,
  parameter int unsigned NA  = RAM1_NA,
  parameter int unsigned ND  = RAM1_ND,
  parameter int unsigned AAW = rfaw(NA),
  parameter int unsigned DAW = rfaw(ND)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           we,
  input  logic           wa_we,
  input  logic [AAW-1:0] wa_ad,
  input  logic           wa_sel,
  input  logic           wd_we,
  input  logic [DAW-1:0] wd_ad,
  input  logic           wd_sel,
  input  logic [AAW-1:0] ra,
  input  logic [DAW-1:0] rd,
  input  logic [DW-1:0]  bus1,
  input  logic [DW-1:0]  bus2,
  input  logic           ext_en,
  input  logic           ext_we,
  input  logic [AW-1:0]  ext_addr,
  input  logic [DW-1:0]  ext_wdata,
  output logic [DW-1:0]  rdata
);
  logic [DW-1:0] mem [WORDS];
  logic [AW-1:0] av, addr;
  logic [DW-1:0] dv, wdata;
  logic          wen;
  localparam int unsigned IW = $clog2(WORDS);

  regfile #(.N(NA), .W(AW), .AW(AAW)) u_ra (
    .clk, .rst_n, .we(wa_we), .waddr(wa_ad),
    .wdata(wa_sel ? bus2[AW-1:0] : bus1[AW-1:0]), .raddr(ra), .rdata(av));
  regfile #(.N(ND), .W(DW), .AW(DAW)) u_rd (
    .clk, .rst_n, .we(wd_we), .waddr(wd_ad),
    .wdata(wd_sel ? bus2 : bus1), .raddr(rd), .rdata(dv));

  assign addr  = ext_en ? ext_addr  : av;
  assign wen   = ext_en ? ext_we    : we;
  assign wdata = ext_en ? ext_wdata : dv;

  always_ff @(posedge clk) begin
    if (wen && (32'(addr) < WORDS)) mem[addr[IW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   rdata <= '0;
    else if (32'(addr) < WORDS)   rdata <= mem[addr[IW-1:0]];
    else                          rdata <= '0;
  end
endmodule
