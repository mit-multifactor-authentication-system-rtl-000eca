00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
000003c0
03c003c0
03c003c0
03c003c0
03c00000
03c003c0
03c00000
00000000
00001c38
1c381c38
1c381c38
00000000
00000000
00000000
00000000
00000000
00000000
039e079c
3fff7fff
0e780e70
fffefffe
38e039c0
31c00000
00000000
00000180
01801ff8
3ff83d80
3f801ff8
01fc019c
39bc3ff8
03c00180
01800000
00000000
3e007780
e3807f06
3e7c0f80
787e00e7
01c700fe
00380000
00000000
000007f0
1ff01e10
1e000f00
3f807bc7
f1f7f0fe
7c7c3ffe
0fcf0000
00000000
000003c0
03c003c0
03c003c0
00000000
00000000
00000000
00000000
00000000
000000f0
01e003c0
03c00780
07800780
07800780
078003c0
01e000e0
00700000
00000f00
078003c0
03c001e0
01e001e0
01e001e0
01e003c0
07800700
0e000000
00000180
01803fbc
0ff01ff8
399c0180
00000000
00000000
00000000
00000000
00000000
00000000
03c003c0
03c07ffe
7ffe03c0
03c003c0
00000000
00000000
00000000
00000000
00000000
00000000
00000000
03c003c0
07c00780
07000000
00000000
00000000
00000000
00000ff0
0ff00000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
03c003c0
03c00000
00000000
0000000c
001c0038
007000e0
01e001c0
03800700
0e001c00
3c003800
00000000
000007e0
1ff83e7c
3c3c3c3c
7dbe7dbe
3c3c3c3c
3e7c1ff8
07e00000
00000000
000003c0
1fe01fe0
01e001e0
01e001e0
01e001e0
1ffe3ffe
1ffe0000
00000000
00001fe0
3ff8307c
003c007c
00f803e0
07c01f00
3ffc7ffc
3ffc0000
00000000
00001fe0
3ff8307c
003c00f8
07f007f8
003c003c
707c7ff8
1fe00000
00000000
00000078
01f803f8
07f80e78
1c783878
7ffe7ffe
00780078
00780000
00000000
00001ff8
3ff83ff8
3c003fe0
3ff8107c
003c003c
307c3ff8
1fc00000
00000000
000003f8
0ff81f08
3c003ff0
3ffc3e3c
3c1e3c1e
3e3c1ff8
07e00000
00000000
00003ffc
3ffc3ffc
007800f0
00f001e0
03c007c0
07800f00
0e000000
00000000
000007e0
1ff83c3c
3c3c3e7c
0ff01ff8
3c3c381c
3c3c1ff8
07e00000
00000000
000007c0
1ff83c78
783c783c
7c7c3ffc
0ffc003c
10781ff0
1fc00000
00000000
00000000
00000000
000003c0
03c00000
00000000
03c003c0
03c00000
00000000
00000000
00000000
000003c0
03c00000
00000000
03c003c0
07c00780
07000000
00000000
00000000
001e01fe
3ff07e00
7f800ffc
007e0006
00000000
00000000
00000000
00000000
00007ffe
7ffe0000
7ffe7ffe
00000000
00000000
00000000
00000000
00000000
78007f80
0ffc007e
01fe3ff0
7e006000
00000000
00000000
000007e0
1ff8187c
003c00f8
01e003c0
03800380
03800380
03800000
00000000
00000000
07f01ffc
380e71fe
e3fee70e
e70ee70e
e3fe70f6
3c001ffe
03fc0000
000003c0
07e007e0
0ff00e70
1e781e78
3ffc3ffc
781e781e
700e0000
00000000
00003fc0
7ff87c7c
783c7c7c
7ff87ffc
781e781e
7c7e7ffc
3fc00000
00000000
000001f8
0ffc1f9c
3e003c00
3c003c00
3c003e00
1f9c0ffc
01f80000
00000000
00003f00
3ff03ffc
3c3c3c3e
3c1e3c1e
3c3e3c3c
3ffc3ff0
3f000000
00000000
00003ffc
3ffc3ffc
3c003c00
3ffc3ffc
3c003c00
3ffc3ffc
3ffc0000
00000000
00003ffc
3ffe3ffc
3c003e00
3ffc3ffc
3c003c00
3c003c00
3c000000
00000000
000003f8
0ffc1f9c
3e003c00
7c7e7c7e
3c7e3e1e
1f1e0ffe
03f00000
00000000
0000381c
3c3c3c3c
3c3c3c3c
3ffc3ffc
3c3c3c3c
3c3c3c3c
381c0000
00000000
00003ffc
3ffc3ffc
03c003c0
03c003c0
03c003c0
3ffc3ffc
3ffc0000
00000000
000007f8
0ff807f8
00780078
00780078
00780078
78f87ff0
1fc00000
00000000
0000381e
783c78f8
79f07fc0
7fc07fe0
7cf07878
783c781e
380e0000
00000000
00001e00
1e001e00
1e001e00
1e001e00
1e001e00
1ffe1ffe
1ffe0000
00000000
00007c3e
7c3e7e7e
7e7e7ffe
7ffe7bde
799e781e
781e781e
700e0000
00000000
00003c1c
7c1e7e1e
7f1e7f1e
7b9e79de
78fe78fe
787e783e
383c0000
00000000
000007e0
1ff83e7c
7c3e781e
781e781e
781e7c3e
3e7c1ff8
07e00000
00000000
00003fc0
3ffc3cfe
3c1e3c1e
3ffe3ff8
3c003c00
3c003c00
3c000000
00000000
000007e0
1ff83e7c
7c3e781e
781e781e
781e7c3e
3e7c1ff8
07f8003c
00100000
00003fc0
3ff83cfc
3c3c3c3c
3ff83ff0
3cf83c7c
3c3c3c1e
380f0000
00000000
000007f0
1ff83c18
3c003f00
1ff007fc
007c003e
387c3ff8
0fe00000
00000000
00007ffe
7ffe7ffe
03c003c0
03c003c0
03c003c0
03c003c0
03c00000
00000000
0000381c
781e781e
781e781e
781e781e
781e781e
3e7c1ff8
07e00000
00000000
0000781e
781e7c3e
3c3c3c3c
1e781e78
0e700ff0
0ff007e0
07e00000
00000000
0000e007
f00ff00f
f3cf73ce
73ee7fee
7f7e3e7e
3e7c3c3c
3c3c0000
00000000
0000700e
7c3e3e7c
1ff80ff0
07e007e0
0ff01ff8
3e7c7c3e
700e0000
00000000
0000700e
781e3c3c
1e781ff8
0ff007e0
03c003c0
03c003c0
03c00000
00000000
00003ffe
3ffe3ffe
007c01f0
03e007c0
0f801e00
3ffe7ffe
3ffe0000
00000000
000007f0
07f00780
07800780
07800780
07800780
07800780
078007f0
03f00000
00003000
38001c00
0e000700
07800380
01c000e0
00700038
003c001c
00000000
00000fe0
0fe001e0
01e001e0
01e001e0
01e001e0
01e001e0
01e00fe0
0fc00000
000003c0
07e01ff8
3c3c700e
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
ffffffff
1c000f00
03800000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
1ff81ffc
003c1ffc
3ffe7c3e
7c3e3ffe
0f9c0000
00000000
00003c00
3c003c00
3df83ffc
3e3e3c1e
3c1e3c1e
3e3c3ffc
3df00000
00000000
00000000
00000000
07f81ffc
1e003c00
3c003e00
1f0c0ffc
03f80000
00000000
0000003c
003c003c
1fbc3ffc
7c7c783c
783c783c
3c7c3ffc
0fbc0000
00000000
00000000
00000000
0ff03ffc
3c3e7ffe
7ffe7800
3e0c1ffc
07f80000
00000000
000001fc
03fc03c0
3ffc3ffc
03c003c0
03c003c0
03c003c0
03800000
00000000
00000000
00000000
0ffc3ffc
7c7c783c
783c7c3c
3efc1ffc
003c187c
1ff80fe0
00003c00
3c003c00
3df83ffc
3e3c3c3c
3c3c3c3c
3c3c3c3c
3c3c0000
00000000
03e003e0
03e00000
1fe01fe0
03e003e0
03e003e0
03e03ffe
3ffe0000
00000000
01e001e0
01e00000
1fe01fe0
01e001e0
01e001e0
01e001e0
01e003e0
3fc03f00
00003c00
3c003c00
3c3e3cf8
3df03fc0
3fe03cf0
3c7c3c3e
3c1e0000
00000000
00007f80
7f800780
07800780
07800780
07800780
07c003fc
00fc0000
00000000
00000000
00000000
7f3c7ffe
73ce73ce
73ce73ce
73ce73ce
718e0000
00000000
00000000
00000000
3df83ffc
3e3c3c3c
3c3c3c3c
3c3c3c3c
3c3c0000
00000000
00000000
00000000
0ff01ff8
3c3c781e
781e781e
3e7c1ff8
07e00000
00000000
00000000
00000000
3df83ffc
3e3e3c1e
3c1e3c1e
3e3c3ffc
3df03c00
3c003c00
00000000
00000000
1fbc3ffc
7c7c783c
783c783c
3c7c3ffc
0fbc003c
003c003c
00000000
00000000
0f7e0ffe
0f820f00
0f000f00
0f000f00
0e000000
00000000
00000000
00000000
0ff81ff8
3c003fc0
0ff8007c
103c3ff8
0fe00000
00000000
00000000
07800780
7ffc7ffc
07800780
07800780
07c003fc
00fc0000
00000000
00000000
00000000
3c3c3c3c
3c3c3c3c
3c3c3c3c
3e7c1ffc
0fbc0000
00000000
00000000
00000000
781e3c3c
3c3c1e78
1e780ff0
0ff007e0
03c00000
00000000
00000000
00000000
e007f00f
718e73ce
77de3ffc
3e7c3e7c
1c380000
00000000
00000000
00000000
3c3c3e7c
0ff007e0
07e00ff0
1e783c3c
781e0000
00000000
00000000
00000000
781e7c3e
3c3c1e78
0f780ff0
07e003e0
03c00780
3f003e00
00000000
00000000
3ffc3ffc
007801f0
07c00f80
3f003ffc
3ffc0000
00000000
000001fc
03fc03c0
03c003c0
03c03f80
3f8003c0
03c003c0
03c003fc
01fc0000
000003c0
03c003c0
03c003c0
03c003c0
03c003c0
03c003c0
03c003c0
03c003c0
00003f80
3fc003c0
03c003c0
03c001fc
01fc03c0
03c003c0
03c03fc0
3f800000
00000000
00000000
00000000
0e007ffe
61fc0000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
