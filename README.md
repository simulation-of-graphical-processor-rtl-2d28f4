# Scene processor for a real-time image generator

A raster image generator can be organised as a pipeline: a scene processor,
a geometry processor, a rasteriser and a video processor. The scene processor
comes first. Each frame, it decides which objects of the scene could be seen
from the current viewpoint. For each object that could be seen, it picks which
of the object's pre-sorted primitive lists the later stages should draw. This
RTL implements the scene processor, following a published description of one
built for priority (BSP-style) hidden-surface algorithms. It has three units
and a data base:

```
            P_o (object)  ┐
                           ├─> MFU ──A,B──> VDU ──FV──> DLU ──RA──> next unit
            P_n (observer) ┘   │             │            ^
                          sin/cos ROM    dividers      Data Base
                                                   (objects, plane normals)
```

* **MFU**, the matrix formation unit, builds matrix A (object to global) and
  matrix B (global to observer) from the objects' and the observer's angles.
* **VDU**, the visibility detection unit, moves the object centre into
  observer space. It then tests the object's bounding sphere against the
  viewing pyramid and sets the visual flag FV.
* **DLU**, the detail/loader unit, computes the list number RA from the side
  of each subdivision plane the observer is on.

The top module is `scene_processor`. Everything is synthesizable
SystemVerilog 2017. It passes `verilator --lint-only -Wall` and the slang
front end of yosys. The few remaining lint warnings are informational. One
notes that the reset drives both the asynchronous reset of the registers and
the `disable iff` of the assertions. The other notes a package constant that
some files do not use.

## Position vectors and coordinate systems

Each object and the observer are described by a position vector
`P = {x, y, z, psi, theta, gamma}`. `{x, y, z}` is the origin of the body's
coordinate system in global coordinates. `{psi, theta, gamma}` gives its
orientation. In this design, `P_o` is the vector of the **object** and `P_n`
that of the **observer**:

* matrix A is formed from `P_o`'s angles;
* matrix B is formed from `P_n`'s angles.

Rotation convention: `R = Rz(psi) * Ry(theta) * Rx(gamma)`, with `A = R(object)`
and `B = R(observer)^T`. x is the viewing (depth) axis of the observer. The
original description gives no axis convention, so this one is this design's
choice. Change `mfu.sv` if you need another.

Number formats (package `sp_pkg`):

| quantity | format |
|---|---|
| coordinates x, y, z | 32-bit signed integer |
| angles | 10-bit unsigned fraction of a full turn (1024 steps) |
| sin, cos, matrix coefficients, plane normals | 16-bit signed, 14 fraction bits (1.0 = 16384) |
| window sizes a_w, b_w, distance d_w, radius R_o | 16-bit unsigned, coordinate units |
| pyramid sides A_w, B_w | 49-bit signed |

All these widths are choices of this design. Products are truncated by
arithmetic shift. Divisions truncate toward zero.

## Matrix formation (`mfu`, `sincos_rom`)

The angles are used as pointers into a sine table (`sincos_rom`). The table
has 1024 entries. Entry i is `round(sin(2*pi*i/1024) * 2^14)`. The table is
computed at elaboration by an integer Taylor series, so no data file is
needed. The same address also reads the cosine, through a second port a
quarter period further on.

The MFU reads the six angles (three of the object, three of the observer), one
per cycle, into registers. It then forms all 18 coefficients of A and B in one
cycle. `done` comes 8 cycles after `start`.

B is formed from the observer's angles only, but the MFU recomputes it for
every object. The cost is 8 cycles per object.

## Visibility test (`vdu`)

The object is replaced by a sphere of radius `R_o` around its centre. First
the centre is moved into observer coordinates:

```
{x_con, y_con, z_con} = B * (P_o.xyz - P_n.xyz)
```

At depth `x_con`, the viewing pyramid has a rectangular cross-section. The
window is `a_w` by `b_w` at distance `d_w`, so the sides of that
cross-section are:

```
A_w = a_w * x_con / d_w        B_w = b_w * x_con / d_w
```

The object may be visible (FV = 1) only if all five terms hold:

```
cond[0]  x_con >  d_w - R_o           not behind the screen
cond[1]  y_con <  B_w/2 + R_o         not beyond one side
cond[2]  y_con > -B_w/2 - R_o         not beyond the other side
cond[3]  z_con <  A_w/2 + R_o         not above
cond[4]  z_con > -A_w/2 - R_o         not below
```

The test is conservative: it uses the sphere, so FV = 1 means "potentially
visible". Two sequential 48-bit restoring dividers (`udiv`) form A_w and B_w
in parallel. The y and z terms are compared after doubling both sides, so the
halving is exact. All five terms are brought out as `cond` / `out_cond`.
`done` comes 52 cycles after `start`.

## Priority-list number (`dlu`)

This is the least obvious part of the design.

Each object's primitives are sorted offline into 2^K lists by a
**topological tree** with K levels. At each level, every node uses the *same*
subdivision plane `SP[l]`, whose normal is `N`. For three levels the tree is:

```
                      SP[0]
              <                 >
          SP[1]                 SP[1]
        <       >             <       >
     SP[2]     SP[2]       SP[2]     SP[2]
     <  >      <  >        <  >      <  >
     0  1      2  3        4  5      6  7      <- lists of primitives
```

Each list is stored in a priority order that is correct for every viewpoint
on the matching side of all K planes. The planes are the same across a
level, so the path through the tree does not depend on earlier decisions.
Each level gives one bit of the list number, and the bits can be computed one
after another with no branching:

```
S_i = (P_o.x - P_n.x)*N_i.x + (P_o.y - P_n.y)*N_i.y + (P_o.z - P_n.z)*N_i.z
RA[i] = (S_i < 0) ? NEG_SET : !NEG_SET          for i = K-1 down to 0
```

With the default `NEG_SET = 0`, a negative scalar product clears the bit and
a positive one sets it. The "<" branch therefore leads to the lower-numbered
lists, as drawn above. Setting `NEG_SET = 1` gives the opposite encoding. That
encoding also appears in flow-chart form in the original description, so it
is kept as an option. S = 0 counts as positive.

The normals are used as given, in global coordinates. They are not rotated by
A. The DLU reads one normal per cycle from the plane-normal table, with a
1-cycle read latency, and forms one scalar product per cycle. `done` comes
K + 1 cycles after `start`. K defaults to 32, so RA is a 32-bit list number.

The DLU is only started for objects with FV = 1. Invisible objects go out
with RA = 0.

## Data base (`data_base`)

`data_base` is a synchronous RAM with one write port and one read port. The
word type is a parameter, and the read latency is one cycle. The scene
processor uses two of them:

* the **object table**: `N_OBJ` words of `obj_rec_t`, which holds the
  position vector P_o and the radius R_o;
* the **plane-normal table**: `N_OBJ * K` words of `nvec_t`. Normal i of
  object n is at address `n*K + i`, so K must be a power of two.

The host fills both tables through the `obj_*` and `nrm_*` ports while the
processor is idle. An assertion checks this.

## Frame sequencing and the output record (`scene_processor`)

To run a frame:

1. Set `p_obs` (the observer vector), `win` (a_w, b_w, d_w) and `num_obj`.
2. Pulse `start`.

For each object n = 0 .. num_obj-1 in turn, the controller:

1. reads the object table (2 cycles);
2. runs the MFU, then the VDU;
3. if FV = 1, runs the DLU;
4. offers a record on the output port.

Record fields:

| field | meaning |
|---|---|
| `out_id` | object index |
| `out_fv` | visual flag |
| `out_ra` | list number, 0 if not visible |
| `out_a`, `out_b` | matrices for the geometry stage |
| `out_con` | object centre in observer space |
| `out_aw`, `out_bw` | pyramid sides |
| `out_cond` | the five visibility terms |

The port is valid/ready. `out_valid` stays high, with the record held stable,
until `out_ready` is high at a clock edge. An assertion checks this. `done`
pulses when the last record has been taken. A `num_obj` of 0 ends at once; a
value above `N_OBJ` is taken as `N_OBJ`.

With `out_ready` held high, an object takes:

* K + 70 cycles if it is visible (102 for K = 32);
* 67 cycles if it is not.

A full 64-object frame therefore takes between about 4,300 and 6,600 cycles.

Parameters of the top: `K` (32), `N_OBJ` (64), `NEG_SET` (0).

## Where this design departs from, or adds to, the original description

* The description names the three units, the data base, the formulas for the
  pyramid sides, the visibility condition and expression (1), and the loop
  structure of the visibility and list-number algorithms. The following are
  all this design's own: the number formats, the rotation convention, the
  table sizes, the latencies, the dividers, the host ports, the valid/ready
  output port and the table layout.
* Reading of the vector names: P_o is taken as the object and P_n as the
  observer. This is the only reading under which "A = object-to-global,
  formed from P_o" holds.
* The description contradicts itself on the sign encoding of RA (see
  `NEG_SET` above). The default follows its prose.
* **Not implemented:**
  * **Level-of-detail selection.** The DLU is meant to work "for the current
    level of detail", but how that level is chosen is not described.
  * **The second phase of the local-data-base loading algorithm.** This
    phase is an object-selection loop over log2(N) steps, with a second
    visibility check.
  * **The lists themselves and the stages after the scene processor.** RA is
    handed on as a number.
* The description says the normals belong to the nodes of the tree. The
  design uses them exactly as expression (1) writes them, in global
  coordinates.
* The units run one after another. There is no overlap between objects.

## Files

| file | contents |
|---|---|
| `rtl/sp_pkg.sv` | widths and record types |
| `rtl/sincos_rom.sv` | sine/cosine table |
| `rtl/mfu.sv` | matrix formation unit |
| `rtl/udiv.sv` | sequential divider used by the VDU |
| `rtl/vdu.sv` | visibility detection unit |
| `rtl/dlu.sv` | detail/loader unit |
| `rtl/data_base.sv` | table RAM |
| `rtl/scene_processor.sv` | top: controller and wiring |
| `tb/tb_<unit>.sv` | self-checking testbench of each unit |
| `tb/tb_scene_processor.sv` | end-to-end test at full size |

## Simulating

Each testbench checks its unit against an independent reference model
written in the testbench itself: real-valued trigonometry and 64-bit integer
arithmetic. It prints `TB_RESULT checks=N failures=M` and stops.

Run the end-to-end test with the default parameters:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/sp_pkg.sv tb/tb_scene_processor.sv --top-module tb_scene_processor
./obj_dir/Vtb_scene_processor
```

The end-to-end test runs several frames:

* one object with the window of the published example. It gives FV = 1 and
  RA = FFFFFFFF;
* an empty frame;
* four full 64-object frames, with the observer turned by quarter turns;
* a frame with random observer angles that asks for more objects than the
  table holds.

The next unit's ready signal is toggled at random. The test counts, and
requires, each of these mechanisms at least once:

* a visible object;
* each visibility term failing;
* a skipped list computation;
* RA bits set and RA bits cleared;
* an output stall;
* an empty frame;
* a clamped frame.

It also checks the per-object cycle counts.

The unit testbenches are run the same way with their own top modules:
`tb_sincos_rom`, `tb_mfu`, `tb_udiv`, `tb_vdu`, `tb_dlu` and `tb_data_base`.
`tb_dlu` runs both `NEG_SET` encodings side by side.
